// Testbench of utmi_rx_shift: random bytes are fed bit by bit, least
// significant bit first, at random spacing; each byte must appear on the
// hold register with byte_ready two clocks after its eighth bit (one clock
// in the full shift register, one into the hold register), and clear must
// drop a partial byte.
`timescale 1ns/1ps
module tb_utmi_rx_shift;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, clr, iv, ib, rdy;
  logic [7:0] hold;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_rx_shift dut (.clk, .rst, .clear_i(clr), .in_valid_i(iv), .in_bit_i(ib),
                     .hold_o(hold), .byte_ready_o(rdy));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] b;
    rst = 1; clr = 0; iv = 0; ib = 0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    check(!rdy, "no byte after reset");
    for (int k = 0; k < 50; k++) begin
      b = 8'($urandom);
      if (k == 20) begin   // partial byte, then clear
        for (int j = 0; j < 5; j++) begin iv = 1; ib = ~b[j]; @(negedge clk); end
        iv = 0; clr = 1; @(negedge clk); clr = 0;
      end
      for (int j = 0; j < 8; j++) begin
        iv = 1; ib = b[j]; @(negedge clk); iv = 0;
        if (j < 7) begin
          check(!rdy, "byte_ready only after the eighth bit");
          repeat (1 + $urandom % 2) @(negedge clk);
        end
      end
      check(!rdy, "byte_ready not in the clock after the eighth bit");
      @(negedge clk);
      check(rdy, "byte_ready two clocks after the eighth bit");
      check(hold == b, $sformatf("byte %0d: %h, expected %h", k, hold, b));
      @(negedge clk);
      check(!rdy, "byte_ready lasts one clock");
      check(hold == b, "hold register keeps the byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
