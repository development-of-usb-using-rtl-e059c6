// Testbench of utmi_tx_fsm: walks the transmit state machine through a
// packet and checks every state and TXReady against the state diagram:
// Reset -> TX Wait -> Send SYNC -> TX Data Load <-> TX Data Wait ->
// Send EOP (waits for the serial path, then for the EOP) -> Reset -> TX Wait.
`timescale 1ns/1ps
module tb_utmi_tx_fsm;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, txv, full, busy, edone, rdy, sstart, eopen, inpkt;
  tx_state_e st;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  utmi_tx_fsm dut (.clk, .rst, .tx_valid_i(txv), .hold_full_i(full), .serial_busy_i(busy),
                   .eop_done_i(edone), .state_o(st), .tx_ready_o(rdy), .sync_start_o(sstart),
                   .eop_enable_o(eopen), .in_packet_o(inpkt));
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic expect_st(input tx_state_e s, input bit r);
    check(st == s, $sformatf("state %s, expected %s", st.name(), s.name()));
    check(rdy == r, $sformatf("TXReady %0b in %s", rdy, st.name()));
  endtask
  initial begin
    rst = 1; txv = 0; full = 0; busy = 0; edone = 0;
    repeat (2) @(negedge clk);
    expect_st(TX_RESET, 0);
    rst = 0; @(negedge clk);
    expect_st(TX_WAIT, 0);
    repeat (3) @(negedge clk);
    expect_st(TX_WAIT, 0);                  // stays without TXValid
    txv = 1; @(negedge clk);
    expect_st(TX_SEND_SYNC, 0); check(sstart && inpkt, "sync start pulse");
    @(negedge clk);
    expect_st(TX_DATA_LOAD, 1); check(!sstart, "sync start is one clock");
    busy = 1;
    for (int b = 0; b < 3; b++) begin
      full = 0; @(negedge clk);               // byte accepted -> hold full
      full = 1;
      expect_st(TX_DATA_WAIT, 0);
      repeat (4) @(negedge clk);
      expect_st(TX_DATA_WAIT, 0);             // waits while hold is full
      full = 0; @(negedge clk);
      expect_st(TX_DATA_LOAD, 1);
    end
    txv = 0; @(negedge clk);
    expect_st(TX_SEND_EOP, 0);
    check(!eopen, "EOP waits for the serial path");
    repeat (3) @(negedge clk);
    check(!eopen, "EOP still waiting");
    busy = 0; #0.1;
    check(eopen, "EOP enabled once drained");
    repeat (3) @(negedge clk);
    expect_st(TX_SEND_EOP, 0);              // EOP not done
    edone = 1; @(negedge clk); edone = 0;
    expect_st(TX_RESET, 0);
    @(negedge clk);
    expect_st(TX_WAIT, 0);
    // reset from the middle of a packet
    txv = 1; repeat (3) @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    expect_st(TX_RESET, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
