// SYNC generator of the transmitter.
//
// A one-cycle start pulse loads the SYNC byte 01111110 into a shift
// register; busy_o then stays high while its eight bits go out, one per bit
// boundary (bit_ce), first bit = bit 7. bit_o is the bit that the encoder
// takes at the next bit boundary. The SYNC byte is sent without bit stuffing
// (it holds six 1s itself), which is this design's reading; the pattern
// value follows the source description.
module utmi_sync_gen
  import utmi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic bit_ce,   // bit boundary: the encoder takes bit_o now
  input  logic start_i,  // sync enable pulse from the transmit state machine
  output logic busy_o,   // SYNC bits still to send
  output logic bit_o     // current SYNC bit
);

  logic [7:0] sr_q;
  logic [3:0] left_q;    // bits still to send

  always_ff @(posedge clk) begin
    if (rst) begin
      sr_q   <= '0;
      left_q <= '0;
    end else if (start_i) begin
      sr_q   <= SYNC_PATTERN;
      left_q <= 4'd8;
    end else if (bit_ce && left_q != 0) begin
      sr_q   <= {sr_q[6:0], 1'b0};
      left_q <= left_q - 1'b1;
    end
  end

  always_comb begin
    busy_o = (left_q != 0);
    bit_o  = sr_q[7];
  end

endmodule
