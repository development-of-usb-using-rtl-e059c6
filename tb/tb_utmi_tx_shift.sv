// Testbench of utmi_tx_shift: random bytes are written whenever the hold
// register is free while bits are taken at random times; the bit stream
// must be the bytes, least significant bit first, with no bit lost or
// repeated, and the hold register must refill while the shift register is
// still busy.
`timescale 1ns/1ps
module tb_utmi_tx_shift;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, load, take, full, avail, b;
  logic [7:0] d;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_tx_shift dut (.clk, .rst, .load_i(load), .data_i(d), .take_i(take),
                     .hold_full_o(full), .bit_avail_o(avail), .bit_o(b));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit expq[$];
  int nbytes = 0, nbits = 0, overlap = 0;
  initial begin
    rst = 1; load = 0; take = 0; d = 0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    check(!full && !avail, "empty after reset");
    while (nbits < 8 * 40) begin
      // decide this cycle's inputs
      load = !full && nbytes < 40 && ($urandom % 3 != 0);
      d    = 8'($urandom);
      take = avail && ($urandom % 2 == 0);
      if (load) begin
        for (int j = 0; j < 8; j++) expq.push_back(d[j]);
        nbytes++;
      end
      if (take) begin
        check(expq.size() > 0 && b == expq[0], $sformatf("bit %0d", nbits));
        if (expq.size() > 0) void'(expq.pop_front());
        nbits++;
      end
      if (full && avail) overlap++;
      @(negedge clk);
    end
    check(overlap > 0, "hold register filled while shifting");
    check(!avail && !full, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
