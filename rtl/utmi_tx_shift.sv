// Transmit hold and shift registers (parallel-to-serial conversion).
//
// The SIE's byte is written into the 8-bit hold register (load_i, which is
// TXValid && TXReady). As soon as the shift register is empty, or gives up
// its last bit in the same cycle, the hold register moves into it and is
// free again, so bytes follow each other on the line without a gap. The
// shift register sends its least significant bit first: bit_o is the next
// bit, bit_avail_o says there is one, take_i consumes it.
//
// Separate hold and shift registers follow the block diagram; the LSB-first
// order and the single-cycle hand-over are this design's choices.
module utmi_tx_shift (
  input  logic       clk,
  input  logic       rst,
  input  logic       load_i,       // write data_i into the hold register
  input  logic [7:0] data_i,
  input  logic       take_i,       // consume bit_o
  output logic       hold_full_o,  // hold register occupied
  output logic       bit_avail_o,  // shift register holds a bit
  output logic       bit_o
);

  logic [7:0] hold_q, shift_q;
  logic [3:0] cnt_q;   // bits left in the shift register
  logic       xfer;

  always_comb begin
    xfer        = hold_full_o && (cnt_q == 0 || (cnt_q == 1 && take_i));
    bit_avail_o = (cnt_q != 0);
    bit_o       = shift_q[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_q      <= '0;
      shift_q     <= '0;
      cnt_q       <= '0;
      hold_full_o <= 1'b0;
    end else begin
      if (xfer) begin
        shift_q     <= hold_q;
        cnt_q       <= 4'd8;
        hold_full_o <= 1'b0;
      end else if (take_i && cnt_q != 0) begin
        shift_q <= {1'b0, shift_q[7:1]};
        cnt_q   <= cnt_q - 1'b1;
      end
      if (load_i && !hold_full_o) begin
        hold_q      <= data_i;
        hold_full_o <= 1'b1;
      end
    end
  end

endmodule
