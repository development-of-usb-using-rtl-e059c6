// Transmit state machine.
//
// States and their outputs follow the transmit state diagram:
//   Reset        : TXReady low; leaves for TX Wait once rst is low.
//   TX Wait      : waits for TXValid, then Send SYNC.
//   Send SYNC    : one cycle; pulses sync_start_o to start the SYNC byte.
//   TX Data Load : TXReady high; the SIE's byte is written into the hold
//                  register in this cycle, so the machine moves to TX Data
//                  Wait. If TXValid is low it goes to Send EOP instead.
//   TX Data Wait : TXReady low while the hold register is full; back to TX
//                  Data Load once the shift register has taken the byte.
//   Send EOP     : TXReady low. Waits until the serial path has drained
//                  (serial_busy_i low), then holds eop_enable_o high until
//                  the EOP generator reports done, and returns to Reset as
//                  the diagram shows, from where it re-enters TX Wait.
// Reset is synchronous and active high. TXReady is a Moore output, so an
// SIE that holds TXValid high has one byte accepted per TX Data Load cycle.
// Draining the serial path before the EOP is this design's addition.
module utmi_tx_fsm
  import utmi_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      tx_valid_i,
  input  logic      hold_full_i,    // TX hold register occupied
  input  logic      serial_busy_i,  // SYNC, data or stuffed bit still to send
  input  logic      eop_done_i,
  output tx_state_e state_o,
  output logic      tx_ready_o,
  output logic      sync_start_o,
  output logic      eop_enable_o,
  output logic      in_packet_o     // between Send SYNC and the end of Send EOP
);

  tx_state_e next;

  always_comb begin
    next = state_o;
    unique case (state_o)
      TX_RESET:     next = TX_WAIT;
      TX_WAIT:      if (tx_valid_i) next = TX_SEND_SYNC;
      TX_SEND_SYNC: next = TX_DATA_LOAD;
      TX_DATA_LOAD: next = tx_valid_i ? TX_DATA_WAIT : TX_SEND_EOP;
      TX_DATA_WAIT: if (!hold_full_i) next = TX_DATA_LOAD;
      TX_SEND_EOP:  if (eop_done_i) next = TX_RESET;
      default:      next = TX_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state_o <= TX_RESET;
    else     state_o <= next;
  end

  always_comb begin
    tx_ready_o   = (state_o == TX_DATA_LOAD);
    sync_start_o = (state_o == TX_SEND_SYNC);
    eop_enable_o = (state_o == TX_SEND_EOP) && !serial_busy_i;
    in_packet_o  = (state_o != TX_RESET) && (state_o != TX_WAIT);
  end

endmodule
