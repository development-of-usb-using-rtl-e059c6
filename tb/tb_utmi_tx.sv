// Testbench of utmi_tx: packets of random bytes are handed over with
// TXValid/TXReady at high speed (one half bit per clock); every half cell
// on the line is compared with a reference built here from the bytes
// (SYNC 01111110, LSB-first data with a 0 after six 1s, SE0 SE0 J). The
// line must be driven for exactly as many clocks as there are half cells,
// i.e. two clocks per bit.
`timescale 1ns/1ps
module tb_utmi_tx;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, hce, ph, txv, rdy, dp, dm, oe, stf;
  logic [7:0] d;
  opmode_e om;
  tx_state_e st;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_tx dut (.clk, .rst, .half_ce(hce), .phase_i(ph), .opmode_i(om), .tx_valid_i(txv),
               .data_i(d), .tx_ready_o(rdy), .dp_o(dp), .dm_o(dm), .oe_o(oe), .state_o(st),
               .stuffed_o(stf));
  // half-bit timing as the control logic makes it at high speed
  always_ff @(posedge clk) if (rst) ph <= 1'b0; else ph <= ~ph;
  assign hce = !rst;

  logic [1:0] cap[$];
  always @(negedge clk) if (oe) cap.push_back({dp, dm});

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic void add_bit(input bit b, ref logic [1:0] q[$]);
    q.push_back({~b, b}); q.push_back({b, ~b});
  endfunction

  initial begin
    logic [7:0] pkt[$];
    logic [1:0] exp[$];
    int ones, i, nst;
    rst = 1; txv = 0; d = 0; om = OPMODE_NORMAL;
    repeat (4) @(negedge clk); rst = 0; repeat (4) @(negedge clk);
    for (int p = 0; p < 6; p++) begin
      pkt.delete();
      for (int k = 0; k < 1 + p * 5; k++) pkt.push_back((p % 2 == 1) ? 8'hFF : 8'($urandom));
      exp.delete(); ones = 0; nst = 0;
      for (int k = 7; k >= 0; k--) add_bit(SYNC_PATTERN[k], exp);
      foreach (pkt[k]) for (int j = 0; j < 8; j++) begin
        add_bit(pkt[k][j], exp);
        ones = pkt[k][j] ? ones + 1 : 0;
        if (ones == 6) begin add_bit(1'b0, exp); ones = 0; nst++; end
      end
      repeat (4) exp.push_back(2'b00);
      repeat (2) exp.push_back(2'b10);
      cap.delete();
      // SIE
      @(negedge clk); txv = 1; d = pkt[0]; i = 0;
      while (i < pkt.size()) begin
        if (rdy) begin
          i++; @(negedge clk);
          if (i < pkt.size()) d = pkt[i]; else txv = 0;
        end else @(negedge clk);
      end
      while (st != TX_WAIT || oe) @(negedge clk);
      check(cap.size() == exp.size(),
            $sformatf("packet %0d: %0d half cells, expected %0d", p, cap.size(), exp.size()));
      for (int k = 0; k < exp.size() && k < cap.size(); k++)
        if (cap[k] != exp[k]) begin
          check(0, $sformatf("packet %0d: half cell %0d %b vs %b", p, k, cap[k], exp[k])); break;
        end
      repeat (10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
