// SYNC detector of the receiver.
//
// Samples DP and DM once per half bit cell (half_ce) into 16-deep shift
// registers and compares them with the Manchester-coded SYNC byte: DP must
// equal utmi_pkg::encoded_sync() and DM must be the complement of DP in
// every one of the 16 half cells. sync_detected_o pulses for one clock after
// the half_ce that brought in the last half of the SYNC byte, so the next
// sample is the first half of the first data bit; the receiver uses the
// pulse to align its bit timing.
//
// The source describes the detector as a small state machine checking one
// bit per clock; a 16-sample comparator does the same job and also finds
// the bit phase. Matching the transmitter's SYNC byte is this design's
// choice (see the README).
module utmi_sync_det
  import utmi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic half_ce,
  input  logic dp_i,
  input  logic dm_i,
  output logic sync_detected_o
);

  localparam logic [15:0] ENC_SYNC = encoded_sync();

  logic [15:0] dp_sr, diff_sr;
  logic        fresh_q;   // a sample was taken at the last edge

  always_ff @(posedge clk) begin
    if (rst) begin
      dp_sr   <= '1;
      diff_sr <= '0;
      fresh_q <= 1'b0;
    end else begin
      fresh_q <= half_ce;
      if (half_ce) begin
        dp_sr   <= {dp_sr[14:0], dp_i};
        diff_sr <= {diff_sr[14:0], dp_i ^ dm_i};
      end
    end
  end

  always_comb sync_detected_o = fresh_q && (dp_sr == ENC_SYNC) && (&diff_sr);

endmodule
