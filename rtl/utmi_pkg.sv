// Shared types and constants of the UTMI transceiver core.
//
// The transceiver moves bytes between an 8-bit parallel interface and a
// two-wire (DP/DM) serial line. Every bit on the line is Manchester encoded:
// a 1 is a low-to-high transition of DP in the middle of the bit cell, a 0 a
// high-to-low transition; DM is always the complement of DP while data is
// sent. A packet is framed by the SYNC byte 01111110 in front and by an EOP
// (two bit times of SE0, both wires low, then one bit time of J) behind it.
// Six consecutive 1s in the data are followed by a stuffed 0.
//
// The SYNC value, the six-1s stuffing rule, the operational-mode codes, the
// EOP shape and the two line rates (480 and 12 Mbit/s) follow the source
// description; the symbol encodings and state encodings are this design's.
package utmi_pkg;

  // Operational modes, selected by the 2-bit OpMode input.
  typedef enum logic [1:0] {
    OPMODE_NORMAL   = 2'd0,  // bit stuffing and Manchester coding on
    OPMODE_NONDRIVE = 2'd1,  // line drivers released (tri-stated)
    OPMODE_RAW      = 2'd2,  // no stuffing, no Manchester: 1 -> J, 0 -> K
    OPMODE_RESERVED = 2'd3   // treated like normal operation
  } opmode_e;

  // SYNC byte, sent first bit = bit 7 (the pattern is symmetric anyway).
  localparam logic [7:0] SYNC_PATTERN = 8'b0111_1110;

  // Number of consecutive 1s after which a 0 is stuffed.
  localparam int unsigned STUFF_RUN = 6;

  // Bit-time symbols handed to the Manchester encoder.
  typedef enum logic [2:0] {
    TXS_IDLE  = 3'd0,  // line not driven (idle J held by the bus)
    TXS_DATA0 = 3'd1,  // data 0: DP high then low
    TXS_DATA1 = 3'd2,  // data 1: DP low then high
    TXS_SE0   = 3'd3,  // both wires low for the whole bit
    TXS_J     = 3'd4   // DP high, DM low for the whole bit
  } tx_sym_e;

  // Bit-time symbols recovered by the Manchester decoder.
  typedef enum logic [2:0] {
    RXS_DATA0 = 3'd0,
    RXS_DATA1 = 3'd1,
    RXS_SE0   = 3'd2,
    RXS_J     = 3'd3,
    RXS_VIOL  = 3'd4   // any other pair of half-bit line states
  } rx_sym_e;

  // Transmit state machine states.
  typedef enum logic [2:0] {
    TX_RESET     = 3'd0,
    TX_WAIT      = 3'd1,
    TX_SEND_SYNC = 3'd2,
    TX_DATA_LOAD = 3'd3,
    TX_DATA_WAIT = 3'd4,
    TX_SEND_EOP  = 3'd5
  } tx_state_e;

  // Receive state machine states.
  typedef enum logic [2:0] {
    RX_RESET     = 3'd0,
    RX_WAIT      = 3'd1,
    RX_STRIP_SYNC= 3'd2,
    RX_DATA      = 3'd3,
    RX_DATA_WAIT = 3'd4,
    RX_STRIP_EOP = 3'd5,
    RX_ERROR     = 3'd6
  } rx_state_e;

  // DP samples of the Manchester-coded SYNC byte, one per half bit, oldest
  // sample in bit 15. Bit b of the byte becomes the half-bit pair {~b, b}.
  function automatic logic [15:0] encoded_sync();
    logic [15:0] e;
    for (int i = 7; i >= 0; i--) begin
      e[2*i+1] = ~SYNC_PATTERN[i];
      e[2*i]   =  SYNC_PATTERN[i];
    end
    return e;
  endfunction

endpackage
