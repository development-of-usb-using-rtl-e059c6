// End-to-end testbench of the UTMI core, at the core's default parameters.
//
// The SIE side is modelled by tasks that hand bytes over with
// TXValid/TXReady. The line is looped back: while the core drives it, its
// receiver sees its own packet; otherwise the bench either leaves the bus
// idle in J or injects a packet of its own. Every half bit cell the core
// puts on the line is captured and compared with a reference stream the
// bench builds itself from the bytes (SYNC 01111110, LSB-first data, a 0
// after six 1s, SE0 SE0 J), which also checks the line rate: each half cell
// must last exactly one half-bit period (1 clock at high speed, 40 at full
// speed). Received bytes are compared with the bytes sent.
//
// Covered: high- and full-speed packets, bit stuffing and unstuffing, hold
// register back-pressure (TX Data Wait), RX Data Wait, SYNC and EOP
// detection, OpMode 1 (drivers off), OpMode 2 (raw J/K), a stuff error and
// a Manchester code violation in injected packets, and the direction of the
// bidirectional data bus. Each mechanism is counted; one that never occurs
// is a failure.
`timescale 1ns/1ps
module tb_utmi_top;
  import utmi_pkg::*;

  localparam int FS_DIV = 40;

  logic clk = 1'b0;
  always #0.5 clk = ~clk;

  logic       rst;
  logic [1:0] opmode;
  logic       xcvr;
  logic       tx_valid, tx_ready;
  logic [7:0] data_i, data_o;
  logic       data_oe, rx_active, rx_valid, rx_error;
  logic       dp_o, dm_o, line_oe, dp_i, dm_i;
  logic       inj_en, inj_dp, inj_dm;

  utmi_top dut (
    .clk, .rst,
    .opmode_i      (opmode),
    .xcvr_select_i (xcvr),
    .tx_valid_i    (tx_valid),
    .tx_ready_o    (tx_ready),
    .data_i, .data_o,
    .data_oe_o     (data_oe),
    .rx_active_o   (rx_active),
    .rx_valid_o    (rx_valid),
    .rx_error_o    (rx_error),
    .dp_o, .dm_o,
    .line_oe_o     (line_oe),
    .dp_i, .dm_i
  );

  // bus: driven by the core, by the bench, or idle J
  always_comb begin
    if (line_oe)     {dp_i, dm_i} = {dp_o, dm_o};
    else if (inj_en) {dp_i, dm_i} = {inj_dp, inj_dm};
    else             {dp_i, dm_i} = 2'b10;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------- capture of the transmitted line ----------------
  logic       hc_d = 1'b0;
  logic [1:0] cap[$];
  int         oe_cycles = 0;
  always @(posedge clk) hc_d <= dut.half_ce;
  always @(negedge clk) if (hc_d && line_oe) cap.push_back({dp_o, dm_o});
  always @(posedge clk) if (line_oe) oe_cycles++;

  // ---------------- received bytes ----------------
  logic [7:0] rxq[$];
  always @(negedge clk) if (rx_valid) rxq.push_back(data_o);

  // ---------------- mechanism counters ----------------
  int n_stuff = 0, n_strip = 0, n_stuff_err = 0, n_viol_err = 0;
  int n_txwait = 0, n_rxwait = 0, n_sync = 0, n_eop = 0;
  int n_hs = 0, n_fs = 0, n_mode1 = 0, n_mode2 = 0, n_bus = 0;
  tx_state_e txs_d = TX_RESET;
  rx_state_e rxs_d = RX_RESET;
  always @(negedge clk) begin
    if (dut.u_tx.stuffed_o)   n_stuff++;
    if (dut.u_rx.stripped_o)  n_strip++;
    if (dut.u_rx.sync_seen_o) n_sync++;
    if (dut.u_rx.eop_seen_o)  n_eop++;
    if (dut.u_tx.state_o == TX_DATA_WAIT && txs_d != TX_DATA_WAIT) n_txwait++;
    if (dut.u_rx.state_o == RX_DATA_WAIT && rxs_d != RX_DATA_WAIT) n_rxwait++;
    txs_d = dut.u_tx.state_o;
    rxs_d = dut.u_rx.state_o;
    if (rst == 1'b0 && data_oe != !tx_valid) begin
      failures++;
      $display("FAIL @%0t: data bus direction", $time);
    end
  end

  // ---------------- reference line stream ----------------
  function automatic void add_bit(input bit d, input bit raw, ref logic [1:0] q[$]);
    if (raw) begin
      q.push_back({d, ~d}); q.push_back({d, ~d});
    end else begin
      q.push_back({~d, d}); q.push_back({d, ~d});
    end
  endfunction

  function automatic void build_line(input logic [7:0] b[$], input bit raw,
                                     ref logic [1:0] q[$]);
    logic [7:0] sync = 8'b0111_1110;
    int ones = 0;
    q.delete();
    for (int i = 7; i >= 0; i--) add_bit(sync[i], raw, q);
    foreach (b[k]) for (int j = 0; j < 8; j++) begin
      add_bit(b[k][j], raw, q);
      if (!raw) begin
        ones = b[k][j] ? ones + 1 : 0;
        if (ones == 6) begin add_bit(1'b0, raw, q); ones = 0; end
      end
    end
    repeat (4) q.push_back(2'b00);
    repeat (2) q.push_back(2'b10);
  endfunction

  // ---------------- SIE model ----------------
  task automatic sie_send(input logic [7:0] b[$]);
    int i = 0;
    @(negedge clk); tx_valid = 1'b1; data_i = b[0];
    while (i < b.size()) begin
      if (tx_ready) begin
        i++;
        @(negedge clk);
        if (i < b.size()) data_i = b[i];
        else tx_valid = 1'b0;
      end else begin
        @(negedge clk);
      end
    end
  endtask

  task automatic wait_idle();
    // transmitter back in TX Wait and receiver back in RX Wait
    do @(negedge clk);
    while (dut.u_tx.state_o != TX_WAIT || line_oe || rx_active ||
           dut.u_rx.state_o == RX_STRIP_EOP);
    repeat (4 * FS_DIV) @(negedge clk);
  endtask

  // One packet through the core, looped back, compared on the line and at
  // the receive side.
  task automatic loop_packet(input logic [7:0] b[$], input bit fs, input string tag);
    logic [1:0] exp[$];
    int div = fs ? FS_DIV : 1;
    cap.delete(); rxq.delete(); oe_cycles = 0;
    build_line(b, 1'b0, exp);
    sie_send(b);
    wait_idle();
    check(cap.size() == exp.size(),
          $sformatf("%s: %0d half cells on the line, expected %0d", tag, cap.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < cap.size(); i++)
      if (cap[i] != exp[i]) begin
        check(1'b0, $sformatf("%s: half cell %0d is %b, expected %b", tag, i, cap[i], exp[i]));
        break;
      end
    check(oe_cycles == exp.size() * div,
          $sformatf("%s: line driven %0d clocks, expected %0d", tag, oe_cycles, exp.size() * div));
    check(rxq.size() == b.size(),
          $sformatf("%s: received %0d bytes, sent %0d", tag, rxq.size(), b.size()));
    for (int i = 0; i < b.size() && i < rxq.size(); i++)
      check(rxq[i] == b[i], $sformatf("%s: byte %0d received %h sent %h", tag, i, rxq[i], b[i]));
    if (fs) n_fs++; else n_hs++;
  endtask

  // Bench-driven line: one pair {dp,dm} per half cell, each set up before
  // the half_ce edge that samples it.
  task automatic inject(input logic [1:0] h[$]);
    inj_en = 1'b1;
    foreach (h[i]) begin
      do @(negedge clk); while (!dut.half_ce);
      {inj_dp, inj_dm} = h[i];
    end
    do @(negedge clk); while (!dut.half_ce);
    {inj_dp, inj_dm} = 2'b10;
    @(negedge clk);
    inj_en = 1'b0;
  endtask

  logic seen_err;
  always @(negedge clk) if (rx_error) seen_err = 1'b1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pkt[$];
    logic [1:0] h[$];
    logic [1:0] exp[$];
    rst = 1'b1; opmode = 2'd0; xcvr = 1'b0; tx_valid = 1'b0; data_i = '0;
    inj_en = 1'b0; inj_dp = 1'b1; inj_dm = 1'b0; seen_err = 1'b0;
    repeat (5) @(negedge clk);
    check(!tx_ready && !rx_active && !rx_valid && !line_oe, "outputs in reset");
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(dut.u_tx.state_o == TX_WAIT && dut.u_rx.state_o == RX_WAIT, "wait states after reset");

    // 1: high speed, bytes chosen to force stuffing
    pkt = '{8'hA5, 8'hFF, 8'hFF, 8'h3F, 8'h00, 8'h7E, 8'hFC, 8'h01};
    loop_packet(pkt, 1'b0, "HS fixed");

    // 2: high speed, random bytes
    pkt.delete();
    for (int i = 0; i < 24; i++) pkt.push_back(8'($urandom));
    loop_packet(pkt, 1'b0, "HS random");

    // 3: single-byte packet
    pkt = '{8'hFF};
    loop_packet(pkt, 1'b0, "HS one byte");

    // 4: full speed
    xcvr = 1'b1; repeat (100) @(negedge clk);
    pkt = '{8'h2D, 8'hFF, 8'h7F, 8'h80};
    loop_packet(pkt, 1'b1, "FS fixed");
    xcvr = 1'b0; repeat (100) @(negedge clk);

    // 5: OpMode 1, drivers released
    opmode = 2'd1; repeat (4) @(negedge clk);
    cap.delete(); rxq.delete(); oe_cycles = 0;
    pkt = '{8'hC3, 8'hFF};
    sie_send(pkt);
    wait_idle();
    check(oe_cycles == 0, "OpMode 1: line must not be driven");
    check(rxq.size() == 0, "OpMode 1: nothing received");
    n_mode1++;

    // 6: OpMode 2, no stuffing, 1 -> J and 0 -> K
    opmode = 2'd2; repeat (4) @(negedge clk);
    cap.delete(); oe_cycles = 0;
    pkt = '{8'hFF, 8'hFF, 8'h5A};
    build_line(pkt, 1'b1, exp);
    begin
      int st0;
      st0 = n_stuff;
      sie_send(pkt);
      wait_idle();
      check(n_stuff == st0, "OpMode 2: no stuffed bits");
    end
    check(cap.size() == exp.size(), $sformatf("OpMode 2: %0d half cells, expected %0d", cap.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < cap.size(); i++)
      if (cap[i] != exp[i]) begin
        check(1'b0, $sformatf("OpMode 2: half cell %0d is %b, expected %b", i, cap[i], exp[i]));
        break;
      end
    n_mode2++;
    opmode = 2'd0; repeat (4) @(negedge clk);

    // 7: bench-generated good packet into the receiver
    rxq.delete();
    pkt = '{8'hFF, 8'h0F, 8'hF0, 8'h3F};
    build_line(pkt, 1'b0, h);
    inject(h);
    wait_idle();
    check(rxq.size() == pkt.size(), "injected packet: byte count");
    foreach (pkt[i]) if (i < rxq.size())
      check(rxq[i] == pkt[i], $sformatf("injected byte %0d: %h vs %h", i, rxq[i], pkt[i]));
    check(!seen_err, "injected good packet: no error");

    // 8: stuff error: seven 1s in a row with no stuffed 0
    seen_err = 1'b0;
    h.delete();
    for (int i = 7; i >= 0; i--) add_bit(SYNC_PATTERN[i], 1'b0, h);
    repeat (7) add_bit(1'b1, 1'b0, h);
    repeat (9) add_bit(1'b0, 1'b0, h);
    repeat (4) h.push_back(2'b00);
    repeat (2) h.push_back(2'b10);
    begin
      int e0;
      e0 = n_stuff_err;
      fork
        inject(h);
        begin
          while (1) begin @(negedge clk); if (dut.u_rx.stuff_err_o) n_stuff_err++; end
        end
      join_any
      disable fork;
      check(n_stuff_err > e0, "stuff error reported");
    end
    check(seen_err, "stuff error raises RXError");
    wait_idle();
    check(dut.u_rx.state_o == RX_WAIT, "receiver back in RX Wait after error packet");

    // 9: Manchester code violation (K K half cells)
    seen_err = 1'b0;
    h.delete();
    for (int i = 7; i >= 0; i--) add_bit(SYNC_PATTERN[i], 1'b0, h);
    repeat (3) add_bit(1'b0, 1'b0, h);
    h.push_back(2'b01); h.push_back(2'b01);
    repeat (4) add_bit(1'b1, 1'b0, h);
    repeat (4) h.push_back(2'b00);
    repeat (2) h.push_back(2'b10);
    inject(h);
    wait_idle();
    check(seen_err, "code violation raises RXError");
    if (seen_err) n_viol_err++;
    check(dut.u_rx.state_o == RX_WAIT, "receiver back in RX Wait after violation");

    // 10: the core still works after the errors
    pkt = '{8'h69, 8'h96};
    loop_packet(pkt, 1'b0, "HS after errors");

    check(n_hs > 0,        "mechanism: high-speed packet");
    check(n_fs > 0,        "mechanism: full-speed packet");
    check(n_stuff > 0,     "mechanism: bit stuffing");
    check(n_strip > 0,     "mechanism: bit unstuffing");
    check(n_stuff_err > 0, "mechanism: stuff error");
    check(n_viol_err > 0,  "mechanism: code violation");
    check(n_txwait > 0,    "mechanism: TX Data Wait");
    check(n_rxwait > 0,    "mechanism: RX Data Wait");
    check(n_sync > 0,      "mechanism: SYNC detect");
    check(n_eop > 0,       "mechanism: EOP detect");
    check(n_mode1 > 0,     "mechanism: OpMode 1");
    check(n_mode2 > 0,     "mechanism: OpMode 2");
    $display("counts: hs=%0d fs=%0d stuff=%0d strip=%0d stufferr=%0d viol=%0d txwait=%0d rxwait=%0d sync=%0d eop=%0d",
             n_hs, n_fs, n_stuff, n_strip, n_stuff_err, n_viol_err, n_txwait, n_rxwait, n_sync, n_eop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
