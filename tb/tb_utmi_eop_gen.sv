// Testbench of utmi_eop_gen: with the enable held, the symbols taken at
// three bit boundaries must be SE0, SE0, J, after which done rises; the
// sequence must restart after the enable falls.
`timescale 1ns/1ps
module tb_utmi_eop_gen;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, en, bce, sv, done;
  tx_sym_e sym;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_eop_gen dut (.clk, .rst, .eop_enable_i(en), .bit_ce(bce), .sym_valid_o(sv),
                    .sym_o(sym), .done_o(done));
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    static tx_sym_e exp [3] = '{TXS_SE0, TXS_SE0, TXS_J};
    int n;
    rst = 1; en = 0; bce = 0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    check(!sv && !done, "idle");
    for (int rep = 0; rep < 3; rep++) begin
      en = 1; n = 0;
      while (!done) begin
        bce = ($urandom % 4) == 0;
        #0.1;
        if (bce) begin
          check(sv && n < 3 && sym == exp[n], $sformatf("EOP symbol %0d = %s", n, sym.name()));
          n++;
        end
        @(negedge clk);
        check(n <= 3, "EOP too long");
        if (n > 3) break;
      end
      check(n == 3, "three EOP symbols");
      bce = 0; repeat (3) @(negedge clk);
      check(done && !sv, "done holds while enabled");
      en = 0; @(negedge clk);
      check(!done, "done falls with enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
