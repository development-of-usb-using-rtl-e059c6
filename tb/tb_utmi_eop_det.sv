// Testbench of utmi_eop_det: random symbol streams are fed; a detection
// must occur exactly where a reference here finds a J after two or more
// SE0 symbols, one clock after that J.
`timescale 1ns/1ps
module tb_utmi_eop_det;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, sv, eop;
  rx_sym_e sym;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_eop_det dut (.clk, .rst, .sym_valid_i(sv), .sym_i(sym), .eop_detect_o(eop));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    static int se0s = 0, ndet = 0;
    bit expect_eop;
    rst = 1; sv = 0; sym = RXS_J;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      case ($urandom % 4)
        0, 1: sym = RXS_SE0;
        2:    sym = RXS_J;
        default: sym = rx_sym_e'($urandom % 5);
      endcase
      sv = 1;
      expect_eop = (sym == RXS_J) && (se0s >= 2);
      se0s = (sym == RXS_SE0) ? se0s + 1 : 0;
      @(negedge clk);
      sv = 0; sym = RXS_SE0;   // ignored while not valid
      check(eop == expect_eop, $sformatf("symbol %0d: eop %0b expected %0b", i, eop, expect_eop));
      if (eop) ndet++;
      repeat ($urandom % 2) begin @(negedge clk); check(!eop, "pulse is one clock"); end
    end
    check(ndet > 20, "EOPs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
