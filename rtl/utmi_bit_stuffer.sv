// Bit stuffer of the transmitter.
//
// Sits between the transmit shift register and the Manchester encoder and
// counts consecutive 1s passed to the encoder. After STUFF_RUN (six) of them
// it offers a 0 in place of the next data bit, without taking a bit from the
// shift register. out_valid_o/out_bit_o is the bit the encoder takes at the
// next bit boundary (bit_ce) while active_i is high; src_take_o pulls a bit
// from the shift register at that boundary. A stuffed 0 still owed after the
// last data bit is sent before the EOP. stuff_en_i low (OpMode 2) turns the
// insertion off. clear_i restarts the count at the start of a packet.
//
// The six-1s rule follows the source description; the pull interface is
// this design's.
module utmi_bit_stuffer
  import utmi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic clear_i,     // start of packet
  input  logic active_i,    // data phase (SYNC done)
  input  logic stuff_en_i,  // 0 in OpMode 2
  input  logic bit_ce,      // bit boundary
  input  logic src_avail_i, // shift register holds a bit
  input  logic src_bit_i,
  output logic src_take_o,  // consume the shift register bit
  output logic out_valid_o, // a bit is ready for the encoder
  output logic out_bit_o,
  output logic stuffed_o    // pulse: a stuffed 0 went to the encoder
);

  logic [2:0] ones_q;
  logic       pending;
  logic       advance;

  always_comb begin
    pending     = stuff_en_i && (ones_q == 3'(STUFF_RUN));
    out_valid_o = pending || src_avail_i;
    out_bit_o   = pending ? 1'b0 : src_bit_i;
    advance     = bit_ce && active_i && out_valid_o;
    src_take_o  = advance && !pending;
    stuffed_o   = advance && pending;
  end

  always_ff @(posedge clk) begin
    if (rst || clear_i) begin
      ones_q <= '0;
    end else if (advance) begin
      if (pending || !src_bit_i) ones_q <= '0;
      else if (ones_q != 3'd7)   ones_q <= ones_q + 1'b1;
    end
  end

endmodule
