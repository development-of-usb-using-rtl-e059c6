// Testbench of utmi_rx: packets of random bytes are Manchester-coded and
// stuffed by a reference model here and driven onto DP/DM at full-speed
// spacing (one half cell every few clocks); the receiver must deliver the
// bytes in order with one-clock RXValid pulses inside RXActive, four
// clocks after the edge that samples each byte's last half cell, and a
// packet with a stuff error must raise RXError.
`timescale 1ns/1ps
module tb_utmi_rx;
  import utmi_pkg::*;
  localparam int DIV = 3;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, hce, dp, dm, act, vld, rerr, ss, es, strp, serr;
  logic [7:0] d;
  rx_state_e st;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_rx dut (.clk, .rst, .half_ce(hce), .dp_i(dp), .dm_i(dm), .data_o(d), .rx_active_o(act),
               .rx_valid_o(vld), .rx_error_o(rerr), .state_o(st), .sync_seen_o(ss),
               .eop_seen_o(es), .stripped_o(strp), .stuff_err_o(serr));
  int cyc = 0;
  always @(negedge clk) begin cyc++; hce = (cyc % DIV == 0) && !rst; end

  logic [7:0] got[$];
  int got_cyc[$], set_cyc[$];
  bit last_half[$];
  bit sawerr;
  logic mark = 1'b0;
  // clock count at the edge that samples a marked half cell
  always @(posedge clk) if (hce && mark) set_cyc.push_back(cyc);
  always @(negedge clk) begin
    if (vld) begin
      got.push_back(d);
      got_cyc.push_back(cyc);
      if (!act) begin failures++; $display("FAIL: RXValid outside RXActive"); end
    end
    if (rerr) sawerr = 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic void add_bit(input bit b, ref logic [1:0] q[$]);
    q.push_back({~b, b}); q.push_back({b, ~b});
  endfunction

  task automatic drive(input logic [1:0] h[$]);
    foreach (h[i]) begin
      do @(negedge clk); while (!hce);   // hce high: sampled at the next edge
      {dp, dm} = h[i];
      mark = (i < last_half.size()) && last_half[i];
    end
    do @(negedge clk); while (!hce);
    {dp, dm} = 2'b10; mark = 1'b0;
    repeat (8 * DIV) @(negedge clk);
  endtask

  initial begin
    logic [7:0] pkt[$];
    logic [1:0] h[$];
    int ones;
    rst = 1; dp = 1; dm = 0; hce = 0; sawerr = 0;
    repeat (4) @(negedge clk); rst = 0; repeat (10) @(negedge clk);
    for (int p = 0; p < 8; p++) begin
      pkt.delete(); h.delete(); got.delete(); ones = 0;
      got_cyc.delete(); set_cyc.delete(); last_half.delete();
      for (int k = 0; k < 1 + 3 * p; k++) pkt.push_back((p % 3 == 1) ? 8'hFF : 8'($urandom));
      repeat (6) h.push_back(2'b10);
      for (int i = 7; i >= 0; i--) add_bit(SYNC_PATTERN[i], h);
      foreach (pkt[k]) for (int j = 0; j < 8; j++) begin
        add_bit(pkt[k][j], h);
        // mark the second half of each byte's last data bit
        while (last_half.size() < h.size()) last_half.push_back(1'b0);
        if (j == 7) last_half[h.size() - 1] = 1'b1;
        ones = pkt[k][j] ? ones + 1 : 0;
        if (ones == 6) begin add_bit(1'b0, h); ones = 0; end
      end
      repeat (4) h.push_back(2'b00);
      repeat (2) h.push_back(2'b10);
      drive(h);
      // latency: RXValid four clocks after the edge that samples the last half
      check(set_cyc.size() == got_cyc.size(), "latency bookkeeping");
      foreach (got_cyc[k]) if (k < set_cyc.size())
        check(got_cyc[k] - set_cyc[k] - 1 == 4,
              $sformatf("packet %0d byte %0d: RXValid %0d clocks after the sampling edge, expected 4",
                        p, k, got_cyc[k] - set_cyc[k] - 1));
      check(got.size() == pkt.size(), $sformatf("packet %0d: %0d bytes, expected %0d", p, got.size(), pkt.size()));
      foreach (pkt[k]) if (k < got.size())
        check(got[k] == pkt[k], $sformatf("packet %0d byte %0d: %h vs %h", p, k, got[k], pkt[k]));
      check(st == RX_WAIT && !act, "back in RX Wait");
      check(!sawerr, "no error");
    end
    // stuff error
    h.delete();
    repeat (6) h.push_back(2'b10);
    for (int i = 7; i >= 0; i--) add_bit(SYNC_PATTERN[i], h);
    repeat (8) add_bit(1'b1, h);
    repeat (8) add_bit(1'b0, h);
    repeat (4) h.push_back(2'b00);
    repeat (2) h.push_back(2'b10);
    drive(h);
    check(sawerr, "stuff error raises RXError");
    check(st == RX_WAIT, "back in RX Wait after the error packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
