// Testbench of utmi_manchester_dec: after an align pulse, random pairs of
// half-cell line states are fed at random half-bit spacing; each decoded
// symbol must follow the coding table (K,J -> 1; J,K -> 0; SE0,SE0 -> SE0;
// J,J -> J; else violation) and appear one clock after its second half was
// sampled.
`timescale 1ns/1ps
module tb_utmi_manchester_dec;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, hce, al, dp, dm, sv;
  rx_sym_e sym;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_manchester_dec dut (.clk, .rst, .half_ce(hce), .align_i(al), .dp_i(dp), .dm_i(dm),
                           .sym_valid_o(sv), .sym_o(sym));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic rx_sym_e ref_dec(logic [1:0] a, logic [1:0] b);
    if (a == 2'b01 && b == 2'b10) return RXS_DATA1;
    if (a == 2'b10 && b == 2'b01) return RXS_DATA0;
    if (a == 2'b00 && b == 2'b00) return RXS_SE0;
    if (a == 2'b10 && b == 2'b10) return RXS_J;
    return RXS_VIOL;
  endfunction
  initial begin
    logic [1:0] a, b;
    int div, nsv;
    rst = 1; hce = 0; al = 0; dp = 1; dm = 0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    for (int blk = 0; blk < 4; blk++) begin
      div = 1 + blk * 2;
      // misalign on purpose with an odd number of half cells, then align
      repeat (3 + blk) begin hce = 1; @(negedge clk); hce = 0; repeat (div - 1) @(negedge clk); end
      al = 1; @(negedge clk); al = 0;
      for (int i = 0; i < 100; i++) begin
        case ($urandom % 6)
          0, 1: begin a = 2'b01; b = 2'b10; end
          2, 3: begin a = 2'b10; b = 2'b01; end
          4:    begin a = 2'b00; b = 2'b00; end
          default: begin a = 2'($urandom); b = 2'($urandom); end
        endcase
        {dp, dm} = a; repeat (div - 1) @(negedge clk); hce = 1; @(negedge clk); hce = 0;
        check(!sv, "no symbol after the first half");
        {dp, dm} = b; repeat (div - 1) @(negedge clk); hce = 1; @(negedge clk); hce = 0;
        check(sv, "symbol after the second half");
        check(sym == ref_dec(a, b), $sformatf("%b,%b decoded %s", a, b, sym.name()));
      end
      @(negedge clk);
      check(!sv, "valid is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
