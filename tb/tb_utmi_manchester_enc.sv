// Testbench of utmi_manchester_enc: random symbols are offered at bit
// boundaries; each half cell on DP/DM/OE must match the coding rules
// (1: low then high, 0: high then low, DM = ~DP; SE0; J; idle released),
// in OpMode 2 data must be J for 1 and K for 0 over the whole bit, and in
// OpMode 1 the drivers must stay off.
`timescale 1ns/1ps
module tb_utmi_manchester_enc;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, hce, ph, dp, dm, oe;
  opmode_e om;
  tx_sym_e sym;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_manchester_enc dut (.clk, .rst, .half_ce(hce), .phase_i(ph), .opmode_i(om),
                           .sym_i(sym), .dp_o(dp), .dm_o(dm), .oe_o(oe));
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected {dp,dm,oe} for symbol s in half h
  function automatic logic [2:0] expect_half(tx_sym_e s, bit h, opmode_e m);
    logic [2:0] r;
    case (s)
      TXS_DATA1: r = (m == OPMODE_RAW) ? 3'b101 : (h ? 3'b101 : 3'b011);
      TXS_DATA0: r = (m == OPMODE_RAW) ? 3'b011 : (h ? 3'b011 : 3'b101);
      TXS_SE0:   r = 3'b001;
      TXS_J:     r = 3'b101;
      default:   r = 3'b100;
    endcase
    if (m == OPMODE_NONDRIVE) r[0] = 1'b0;
    return r;
  endfunction


  // Drive: the phase register is modelled here; bit boundary = hce && ph.
  initial begin
    static opmode_e modes [3] = '{OPMODE_NORMAL, OPMODE_RAW, OPMODE_NONDRIVE};
    rst = 1; hce = 0; ph = 1; om = OPMODE_NORMAL; sym = TXS_IDLE;
    repeat (3) @(negedge clk); rst = 0;
    foreach (modes[k]) begin
      om = modes[k];
      for (int i = 0; i < 60; i++) begin
        tx_sym_e cur;
        cur = tx_sym_e'($urandom % 5);
        // boundary: ph = 1 and strobe, symbol taken
        ph = 1; hce = 1; sym = cur; @(negedge clk);
        check({dp, dm, oe} == expect_half(cur, 0, om),
              $sformatf("%s %s first half: %b", om.name(), cur.name(), {dp, dm, oe}));
        hce = 0; sym = tx_sym_e'($urandom % 5); repeat ($urandom % 3) @(negedge clk);
        check({dp, dm, oe} == expect_half(cur, 0, om), "first half held");
        ph = 0; hce = 1; @(negedge clk);
        check({dp, dm, oe} == expect_half(cur, 1, om),
              $sformatf("%s %s second half: %b", om.name(), cur.name(), {dp, dm, oe}));
        hce = 0; repeat ($urandom % 3) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
