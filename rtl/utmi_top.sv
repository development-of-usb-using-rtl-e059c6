// UTMI transceiver core (digital part of a USB 2.0 transceiver macrocell).
//
// Sits between a Serial Interface Engine (SIE) with an 8-bit parallel data
// bus and the DP/DM line drivers and receivers of the analog front end.
// Transmit: the SIE hands over bytes with TXValid/TXReady; they leave as a
// Manchester-coded, bit-stuffed packet framed by SYNC and EOP. Receive: a
// packet on DP/DM is decoded, unstuffed and delivered byte by byte with
// RXActive/RXValid; errors raise RXError. The control logic holds OpMode
// (0 normal, 1 non-driving, 2 no stuffing and no Manchester coding,
// 3 reserved) and XcvrSelect (0 high speed 480 Mbit/s, 1 full speed
// 12 Mbit/s) and makes the half-bit timing for both directions.
//
// The SIE data bus Data0-7 is bidirectional: while TXValid is high it
// carries transmit data into the core, otherwise the core drives the
// receive hold register onto it. It appears here as data_i (bus to core),
// data_o (core to bus) and data_oe_o (drive enable = !TXValid). The line
// appears likewise as dp_o/dm_o/line_oe_o towards the drivers and dp_i/dm_i
// from the receivers. The receiver listens all the time, including while
// the core transmits.
//
// Timing: one clock, twice the high-speed bit rate (960 MHz). Bytes move
// on the parallel side in single-clock handshakes on the same clock.
// Reset is synchronous and active high.
module utmi_top
  import utmi_pkg::*;
#(
  parameter int unsigned FS_HALF_BIT_CLKS = 40  // 960 MHz / (2 x 12 MHz)
) (
  input  logic       clk,
  input  logic       rst,
  // control
  input  logic [1:0] opmode_i,
  input  logic       xcvr_select_i,
  // SIE side
  input  logic       tx_valid_i,
  output logic       tx_ready_o,
  input  logic [7:0] data_i,
  output logic [7:0] data_o,
  output logic       data_oe_o,
  output logic       rx_active_o,
  output logic       rx_valid_o,
  output logic       rx_error_o,
  // line side (to / from the analog front end)
  output logic       dp_o,
  output logic       dm_o,
  output logic       line_oe_o,
  input  logic       dp_i,
  input  logic       dm_i
);

  opmode_e    opmode;
  logic       half_ce, phase;
  logic [7:0] rx_data;

  utmi_control #(
    .HS_HALF_BIT_CLKS (1),
    .FS_HALF_BIT_CLKS (FS_HALF_BIT_CLKS)
  ) u_ctrl (
    .clk, .rst,
    .opmode_i,
    .xcvr_select_i,
    .opmode_o  (opmode),
    .fs_mode_o (),
    .half_ce_o (half_ce),
    .phase_o   (phase)
  );

  utmi_tx u_tx (
    .clk, .rst, .half_ce,
    .phase_i   (phase),
    .opmode_i  (opmode),
    .tx_valid_i,
    .data_i,
    .tx_ready_o,
    .dp_o, .dm_o,
    .oe_o      (line_oe_o),
    .state_o   (),
    .stuffed_o ()
  );

  utmi_rx u_rx (
    .clk, .rst, .half_ce,
    .dp_i, .dm_i,
    .data_o      (rx_data),
    .rx_active_o,
    .rx_valid_o,
    .rx_error_o,
    .state_o     (),
    .sync_seen_o (),
    .eop_seen_o  (),
    .stripped_o  (),
    .stuff_err_o ()
  );

  // Bidirectional SIE data bus: receive data goes out when TXValid is low.
  always_comb begin
    data_o    = rx_data;
    data_oe_o = !tx_valid_i;
  end

endmodule
