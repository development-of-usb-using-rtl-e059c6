// UTMI receiver: Manchester-coded packet in, parallel bytes out.
//
// Path: SYNC detector and Manchester decoder on the sampled DP/DM line ->
// bit unstuffer -> receive shift/hold register, with the EOP detector on
// the decoded symbols and the receive state machine on top. In RX Wait the
// SYNC detector both starts a packet and fixes the bit phase of the
// decoder; data bits then flow through the unstuffer into the shift
// register, each full byte shows up on data_o with a one-clock RXValid, and
// SE0, SE0, J ends the packet. A stuffed 1 or a code violation inside a
// packet raises RXError.
//
// Interface: dp_i/dm_i from the line receiver, sampled on half_ce (the same
// half-bit timing the transmitter uses; recovering it from the line is left
// to the analog front end). data_o/rx_valid_o/rx_active_o/rx_error_o to the
// SIE. Latency from the last half cell of a byte's last bit to RXValid is
// four clocks (decoder, unstuffer, shift register, hold register).
module utmi_rx
  import utmi_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       half_ce,
  input  logic       dp_i,
  input  logic       dm_i,
  output logic [7:0] data_o,
  output logic       rx_active_o,
  output logic       rx_valid_o,
  output logic       rx_error_o,
  output rx_state_e  state_o,
  output logic       sync_seen_o,   // pulse: packet start accepted
  output logic       eop_seen_o,    // pulse: EOP detected
  output logic       stripped_o,    // pulse: stuffed 0 removed
  output logic       stuff_err_o    // pulse: stuffing violation
);

  logic    sync_det, hunting, align;
  logic    sym_valid;
  rx_sym_e sym;
  logic    d_valid, d_bit;
  logic    u_valid, u_bit;
  logic    byte_ready;
  logic    viol, error_evt;

  utmi_sync_det u_sync (
    .clk, .rst, .half_ce, .dp_i, .dm_i,
    .sync_detected_o (sync_det)
  );

  always_comb align = sync_det && hunting;

  utmi_manchester_dec u_dec (
    .clk, .rst, .half_ce,
    .align_i     (align),
    .dp_i, .dm_i,
    .sym_valid_o (sym_valid),
    .sym_o       (sym)
  );

  always_comb begin
    d_valid   = sym_valid && rx_active_o &&
                (sym == RXS_DATA0 || sym == RXS_DATA1);
    d_bit     = (sym == RXS_DATA1);
    viol      = sym_valid && rx_active_o && (sym == RXS_VIOL);
    error_evt = viol || stuff_err_o;
  end

  utmi_bit_unstuffer u_unstuff (
    .clk, .rst,
    .clear_i     (align),
    .in_valid_i  (d_valid),
    .in_bit_i    (d_bit),
    .out_valid_o (u_valid),
    .out_bit_o   (u_bit),
    .stripped_o,
    .stuff_err_o
  );

  utmi_rx_shift u_shift (
    .clk, .rst,
    .clear_i      (align),
    .in_valid_i   (u_valid),
    .in_bit_i     (u_bit),
    .hold_o       (data_o),
    .byte_ready_o (byte_ready)
  );

  utmi_eop_det u_eop (
    .clk, .rst,
    .sym_valid_i  (sym_valid),
    .sym_i        (sym),
    .eop_detect_o (eop_seen_o)
  );

  utmi_rx_fsm u_fsm (
    .clk, .rst,
    .sync_detected_i (sync_det),
    .byte_ready_i    (byte_ready),
    .eop_detect_i    (eop_seen_o),
    .error_i         (error_evt),
    .state_o,
    .hunting_o       (hunting),
    .rx_active_o,
    .rx_valid_o,
    .rx_error_o
  );

  always_comb sync_seen_o = align;

endmodule
