// Testbench of utmi_bit_stuffer: a bit source biased towards 1s feeds the
// stuffer; the output stream must equal the source stream with a 0
// inserted after every run of six 1s (reference computed here), including
// a stuffed 0 owed after the last source bit. With stuffing disabled the
// stream must pass unchanged.
`timescale 1ns/1ps
module tb_utmi_bit_stuffer;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, clr, act, sen, bce, avail, sbit, take, ov, ob, stf;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_bit_stuffer dut (.clk, .rst, .clear_i(clr), .active_i(act), .stuff_en_i(sen),
                        .bit_ce(bce), .src_avail_i(avail), .src_bit_i(sbit),
                        .src_take_o(take), .out_valid_o(ov), .out_bit_o(ob), .stuffed_o(stf));

  bit src[$], got[$], exp[$];
  int nstuff;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input bit en, input int n);
    int ones = 0;
    src.delete(); got.delete(); exp.delete(); nstuff = 0;
    for (int i = 0; i < n; i++) src.push_back(($urandom % 8) != 0);
    src.push_back(1); src.push_back(1); src.push_back(1);  // end on a run
    src.push_back(1); src.push_back(1); src.push_back(1);
    foreach (src[i]) begin
      exp.push_back(src[i]);
      ones = src[i] ? ones + 1 : 0;
      if (en && ones == 6) begin exp.push_back(0); ones = 0; end
    end
    sen = en; clr = 1; @(negedge clk); clr = 0; act = 1;
    while (src.size() > 0 || ov) begin
      avail = src.size() > 0;
      sbit  = avail ? src[0] : 1'b0;
      bce   = ($urandom % 2) == 0;
      #0.1;
      if (bce && ov) begin got.push_back(ob); if (stf) nstuff++; end
      if (take) void'(src.pop_front());
      @(negedge clk);
    end
    act = 0; bce = 0; avail = 0;
    check(got.size() == exp.size(), $sformatf("stream length %0d, expected %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      if (got[i] != exp[i]) begin check(0, $sformatf("bit %0d differs", i)); break; end
    if (en) check(nstuff == exp.size() - n - 6, "stuffed count");
    else    check(nstuff == 0, "no stuffing when disabled");
  endtask

  initial begin
    rst = 1; clr = 0; act = 0; sen = 1; bce = 0; avail = 0; sbit = 0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    run(1, 300);
    run(1, 50);
    run(0, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
