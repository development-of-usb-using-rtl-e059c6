// Testbench of utmi_sync_det: the Manchester-coded SYNC byte, sent after
// idle J cells at random half-bit spacing, must give exactly one detection
// pulse, in the clock after its last half cell was sampled; SYNC bytes with
// one half cell corrupted, or with DM not the complement of DP, must give
// none.
`timescale 1ns/1ps
module tb_utmi_sync_det;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, hce, dp, dm, det;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_sync_det dut (.clk, .rst, .half_ce(hce), .dp_i(dp), .dm_i(dm), .sync_detected_o(det));
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ndet = 0;
  always @(negedge clk) if (det) ndet++;

  // send half cells; div clocks each, sampled at the last clock
  task automatic send(input logic [1:0] h[$], input int div, output int det_at);
    det_at = -1;
    foreach (h[i]) begin
      {dp, dm} = h[i];
      for (int c = 0; c < div; c++) begin
        hce = (c == div - 1);
        @(negedge clk);
        if (det) det_at = i;
      end
    end
    hce = 0; {dp, dm} = 2'b10;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    static logic [7:0] sync = 8'b0111_1110;
    logic [1:0] h[$];
    int at, n0, div;
    rst = 1; hce = 0; dp = 1; dm = 0;
    repeat (3) @(negedge clk); rst = 0; @(negedge clk);
    for (int t = 0; t < 12; t++) begin
      div = 1 + (t % 3) * 3;
      h.delete();
      repeat (4 + t) h.push_back(2'b10);
      for (int i = 7; i >= 0; i--) begin
        h.push_back({~sync[i], sync[i]}); h.push_back({sync[i], ~sync[i]});
      end
      // the detection pulse is seen in the clock after the last SYNC half
      h.push_back(2'b10); h.push_back(2'b10);
      if (t >= 8) begin
        int k;
        k = 4 + t + ($urandom % 16);
        if (t % 2 != 0) h[k] = ~h[k];          // wrong line state
        else       h[k][0] = h[k][1];     // DM equal to DP
      end
      n0 = ndet;
      send(h, div, at);
      if (t < 8) begin
        check(ndet - n0 == 1, $sformatf("trial %0d: %0d detections", t, ndet - n0));
        check(at == 4 + t + 15, $sformatf("trial %0d: detection after cell %0d", t, at));
      end else begin
        check(ndet == n0, $sformatf("trial %0d: corrupted SYNC detected", t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
