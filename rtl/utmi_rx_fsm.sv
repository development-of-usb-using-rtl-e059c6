// Receive state machine.
//
// States and outputs follow the receive state diagram:
//   Reset        : RXActive and RXValid low; leaves for RX Wait once rst
//                  is low.
//   RX Wait      : looks for the SYNC byte (sync_detected_i).
//   Strip SYNC   : RXActive high; waits for the first byte.
//   RX Data      : RXActive and RXValid high for the one clock in which a
//                  new byte sits in the receive hold register.
//   RX Data Wait : RXActive high, RXValid low, while the next byte shifts in.
//   Strip EOP    : RXActive and RXValid low for one clock, then RX Wait.
//   Error        : RXError high, RXActive low, after a stuff error or a
//                  Manchester code violation inside a packet.
// Leaving Error when an EOP is seen, and going from Strip SYNC straight to
// Strip EOP for a packet without data, are this design's additions; the
// diagram shows neither. Reset is synchronous and active high.
module utmi_rx_fsm
  import utmi_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      sync_detected_i,
  input  logic      byte_ready_i,
  input  logic      eop_detect_i,
  input  logic      error_i,
  output rx_state_e state_o,
  output logic      hunting_o,   // in RX Wait: a SYNC may start a packet
  output logic      rx_active_o,
  output logic      rx_valid_o,
  output logic      rx_error_o
);

  rx_state_e next;

  always_comb begin
    next = state_o;
    unique case (state_o)
      RX_RESET:      next = RX_WAIT;
      RX_WAIT:       if (sync_detected_i) next = RX_STRIP_SYNC;
      RX_STRIP_SYNC: if (error_i)            next = RX_ERROR;
                     else if (eop_detect_i)  next = RX_STRIP_EOP;
                     else if (byte_ready_i)  next = RX_DATA;
      RX_DATA:       if (error_i)            next = RX_ERROR;
                     else if (eop_detect_i)  next = RX_STRIP_EOP;
                     else if (!byte_ready_i) next = RX_DATA_WAIT;
      RX_DATA_WAIT:  if (error_i)            next = RX_ERROR;
                     else if (eop_detect_i)  next = RX_STRIP_EOP;
                     else if (byte_ready_i)  next = RX_DATA;
      RX_STRIP_EOP:  next = RX_WAIT;
      RX_ERROR:      if (eop_detect_i) next = RX_WAIT;
      default:       next = RX_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state_o <= RX_RESET;
    else     state_o <= next;
  end

  always_comb begin
    hunting_o   = (state_o == RX_WAIT);
    rx_active_o = (state_o == RX_STRIP_SYNC) || (state_o == RX_DATA) ||
                  (state_o == RX_DATA_WAIT);
    rx_valid_o  = (state_o == RX_DATA);
    rx_error_o  = (state_o == RX_ERROR);
  end

endmodule
