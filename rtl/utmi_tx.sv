// UTMI transmitter: parallel bytes in, Manchester-coded packet out.
//
// Path: TX hold/shift register -> bit stuffer -> Manchester encoder, with
// the SYNC generator and the EOP generator feeding the encoder directly.
// The transmit state machine sequences a packet: SYNC byte 01111110, the
// bytes the SIE hands over with TXValid/TXReady, a stuffed 0 after every
// six 1s of data, then SE0, SE0, J. At every bit boundary the encoder takes
// one symbol from the first source that has one: SYNC generator, bit
// stuffer, EOP generator; with none it releases the line.
//
// Interface: tx_valid_i/data_i/tx_ready_o is the SIE side; a byte moves
// when both valid and ready are high at a clock edge. dp_o/dm_o/oe_o go to
// the line drivers. Timing: half_ce/phase_i come from the control logic; one
// bit takes two half_ce periods. The SIE must keep up, i.e. offer the next
// byte within 8 bit times of the last TXReady (an underrun ends the packet
// early with an idle line).
module utmi_tx
  import utmi_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       half_ce,
  input  logic       phase_i,
  input  opmode_e    opmode_i,
  input  logic       tx_valid_i,
  input  logic [7:0] data_i,
  output logic       tx_ready_o,
  output logic       dp_o,
  output logic       dm_o,
  output logic       oe_o,
  output tx_state_e  state_o,
  output logic       stuffed_o    // pulse per stuffed 0
);

  logic    bit_ce;
  logic    sync_start, sync_busy, sync_bit;
  logic    hold_full, sh_avail, sh_bit, sh_take;
  logic    st_valid, st_bit;
  logic    eop_enable, eop_valid, eop_done;
  tx_sym_e eop_sym, sym;
  logic    in_packet, serial_busy;

  always_comb bit_ce = half_ce && phase_i;

  utmi_tx_fsm u_fsm (
    .clk, .rst,
    .tx_valid_i,
    .hold_full_i   (hold_full),
    .serial_busy_i (serial_busy),
    .eop_done_i    (eop_done),
    .state_o,
    .tx_ready_o,
    .sync_start_o  (sync_start),
    .eop_enable_o  (eop_enable),
    .in_packet_o   (in_packet)
  );

  utmi_sync_gen u_sync (
    .clk, .rst, .bit_ce,
    .start_i (sync_start),
    .busy_o  (sync_busy),
    .bit_o   (sync_bit)
  );

  utmi_tx_shift u_shift (
    .clk, .rst,
    .load_i      (tx_valid_i && tx_ready_o),
    .data_i,
    .take_i      (sh_take),
    .hold_full_o (hold_full),
    .bit_avail_o (sh_avail),
    .bit_o       (sh_bit)
  );

  utmi_bit_stuffer u_stuff (
    .clk, .rst,
    .clear_i     (sync_start),
    .active_i    (in_packet && !sync_busy),
    .stuff_en_i  (opmode_i != OPMODE_RAW),
    .bit_ce,
    .src_avail_i (sh_avail),
    .src_bit_i   (sh_bit),
    .src_take_o  (sh_take),
    .out_valid_o (st_valid),
    .out_bit_o   (st_bit),
    .stuffed_o
  );

  utmi_eop_gen u_eop (
    .clk, .rst,
    .eop_enable_i (eop_enable),
    .bit_ce,
    .sym_valid_o  (eop_valid),
    .sym_o        (eop_sym),
    .done_o       (eop_done)
  );

  always_comb begin
    serial_busy = sync_start || sync_busy || hold_full || st_valid;
    if (sync_busy)                   sym = sync_bit ? TXS_DATA1 : TXS_DATA0;
    else if (in_packet && st_valid)  sym = st_bit   ? TXS_DATA1 : TXS_DATA0;
    else if (eop_valid)              sym = eop_sym;
    else                             sym = TXS_IDLE;
  end

  utmi_manchester_enc u_enc (
    .clk, .rst, .half_ce, .phase_i, .opmode_i,
    .sym_i (sym),
    .dp_o, .dm_o, .oe_o
  );

endmodule
