// Testbench of utmi_bit_unstuffer: random bits biased towards 1s are
// stuffed by a reference model here and fed in; the output must be the
// original bits with every stuffed 0 counted as stripped. A stream with a
// 1 where a stuffed 0 belongs must raise the stuff error.
`timescale 1ns/1ps
module tb_utmi_bit_unstuffer;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, clr, iv, ib, ov, ob, strip, serr;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_bit_unstuffer dut (.clk, .rst, .clear_i(clr), .in_valid_i(iv), .in_bit_i(ib),
                          .out_valid_o(ov), .out_bit_o(ob), .stripped_o(strip), .stuff_err_o(serr));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit got[$];
  int nstrip = 0, nerr = 0;
  always @(negedge clk) begin
    if (ov) got.push_back(ob);
    if (strip) nstrip++;
    if (serr) nerr++;
  end
  initial begin
    bit orig[$], line[$];
    static int ones = 0, nst = 0;
    rst = 1; clr = 0; iv = 0; ib = 0;
    repeat (3) @(negedge clk); rst = 0;
    clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 600; i++) orig.push_back(($urandom % 8) != 0);
    foreach (orig[i]) begin
      line.push_back(orig[i]);
      ones = orig[i] ? ones + 1 : 0;
      if (ones == 6) begin line.push_back(0); ones = 0; nst++; end
    end
    foreach (line[i]) begin
      iv = 1; ib = line[i]; @(negedge clk);
      iv = 0; repeat ($urandom % 3) @(negedge clk);
    end
    iv = 0; repeat (3) @(negedge clk);
    check(got.size() == orig.size(), $sformatf("%0d bits out, expected %0d", got.size(), orig.size()));
    for (int i = 0; i < orig.size() && i < got.size(); i++)
      if (got[i] != orig[i]) begin check(0, $sformatf("bit %0d differs", i)); break; end
    check(nstrip == nst, $sformatf("%0d stripped, expected %0d", nstrip, nst));
    check(nerr == 0, "no stuff error on a good stream");
    // seven 1s: error on the seventh
    clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 7; i++) begin
      iv = 1; ib = 1; @(negedge clk); iv = 0;
      if (i < 6) check(!serr, "no error before the seventh 1");
    end
    @(negedge clk);
    check(nerr == 1, "stuff error on seven 1s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
