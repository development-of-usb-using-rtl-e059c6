// Testbench of utmi_sync_gen: after a start pulse the eight bits taken at
// successive bit boundaries must be 0,1,1,1,1,1,1,0 and busy must cover
// exactly those eight boundaries.
`timescale 1ns/1ps
module tb_utmi_sync_gen;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, bce, start, busy, b;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_sync_gen dut (.clk, .rst, .bit_ce(bce), .start_i(start), .busy_o(busy), .bit_o(b));

  // bit boundary every third clock
  int cyc = 0;
  always @(negedge clk) begin cyc++; bce = (cyc % 3 == 0); end

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] got;
    int n;
    static bit exp_bits [8] = '{0, 1, 1, 1, 1, 1, 1, 0};
    rst = 1; start = 0; bce = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (2) @(negedge clk);
    check(!busy, "idle after reset");
    for (int rep = 0; rep < 3; rep++) begin
      start = 1; @(negedge clk); start = 0;
      n = 0;
      #0.1;
      while (busy) begin
        if (bce) begin
          check(n < 8 && b == exp_bits[n], $sformatf("SYNC bit %0d = %0b", n, b));
          n++;
        end
        @(negedge clk); #0.1;
      end
      check(n == 8, $sformatf("SYNC length %0d bits", n));
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
