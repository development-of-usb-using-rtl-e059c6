// Testbench of utmi_rx_fsm: drives the detector events and checks every
// state with RXActive/RXValid/RXError against the receive state diagram:
// Reset -> RX Wait -> Strip SYNC -> RX Data <-> RX Data Wait -> Strip EOP
// -> RX Wait, plus the Error state.
`timescale 1ns/1ps
module tb_utmi_rx_fsm;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, sd, br, eop, err, hunt, act, vld, rerr;
  rx_state_e st;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_rx_fsm dut (.clk, .rst, .sync_detected_i(sd), .byte_ready_i(br), .eop_detect_i(eop),
                   .error_i(err), .state_o(st), .hunting_o(hunt), .rx_active_o(act),
                   .rx_valid_o(vld), .rx_error_o(rerr));
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic expect_st(input rx_state_e s, input bit a, input bit v, input bit e);
    check(st == s, $sformatf("state %s, expected %s", st.name(), s.name()));
    check(act == a && vld == v && rerr == e,
          $sformatf("%s: active %0b valid %0b error %0b", st.name(), act, vld, rerr));
  endtask
  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask
  initial begin
    rst = 1; sd = 0; br = 0; eop = 0; err = 0;
    repeat (2) @(negedge clk);
    expect_st(RX_RESET, 0, 0, 0);
    rst = 0; @(negedge clk);
    expect_st(RX_WAIT, 0, 0, 0); check(hunt, "hunting in RX Wait");
    repeat (3) @(negedge clk); expect_st(RX_WAIT, 0, 0, 0);
    pulse(sd);  expect_st(RX_STRIP_SYNC, 1, 0, 0);
    repeat (3) @(negedge clk); expect_st(RX_STRIP_SYNC, 1, 0, 0);
    for (int b = 0; b < 4; b++) begin
      pulse(br); expect_st(RX_DATA, 1, 1, 0);
      @(negedge clk); expect_st(RX_DATA_WAIT, 1, 0, 0);
      repeat (5) @(negedge clk); expect_st(RX_DATA_WAIT, 1, 0, 0);
    end
    pulse(sd); expect_st(RX_DATA_WAIT, 1, 0, 0);   // SYNC ignored in a packet
    pulse(eop); expect_st(RX_STRIP_EOP, 0, 0, 0);
    @(negedge clk); expect_st(RX_WAIT, 0, 0, 0);
    // error inside a packet
    pulse(sd); pulse(br); @(negedge clk);
    pulse(err); expect_st(RX_ERROR, 0, 0, 1);
    repeat (4) @(negedge clk); expect_st(RX_ERROR, 0, 0, 1);
    pulse(eop); expect_st(RX_WAIT, 0, 0, 0);
    // EOP straight from RX Data
    pulse(sd); br = 1; @(negedge clk); br = 0; expect_st(RX_DATA, 1, 1, 0);
    pulse(eop); expect_st(RX_STRIP_EOP, 0, 0, 0);
    @(negedge clk); expect_st(RX_WAIT, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
