// Manchester decoder of the receiver.
//
// Takes one DP/DM sample per half bit cell (half_ce). The first sample of a
// bit is kept; with the second one the bit is decided:
//   K then J  (DP rises mid-cell)  -> data 1
//   J then K  (DP falls mid-cell)  -> data 0
//   SE0, SE0                       -> SE0
//   J, J                           -> J (end of EOP, idle line)
//   anything else                  -> code violation
// For data, the bit is DP's second half, and XOR of the two DP halves is 1
// for every valid data cell. align_i marks that the sample taken at this
// edge, or at the next half_ce, is the first half of a bit; the SYNC
// detector provides it. sym_valid_o pulses one clock after the second half
// has been sampled, with sym_o holding the result until the next bit.
//
// The coding follows the source description; decoding over a pair of
// half-bit samples and the symbol set are this design's.
module utmi_manchester_dec
  import utmi_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    half_ce,
  input  logic    align_i,
  input  logic    dp_i,
  input  logic    dm_i,
  output logic    sym_valid_o,
  output rx_sym_e sym_o
);

  logic       phase_q;      // 0: next sample is a first half
  logic [1:0] h0_q;         // {dp, dm} of the first half
  logic       eff_phase;
  rx_sym_e    dec;

  always_comb begin
    eff_phase = align_i ? 1'b0 : phase_q;
    unique case ({h0_q, dp_i, dm_i})
      4'b01_10: dec = RXS_DATA1;
      4'b10_01: dec = RXS_DATA0;
      4'b00_00: dec = RXS_SE0;
      4'b10_10: dec = RXS_J;
      default:  dec = RXS_VIOL;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q     <= 1'b0;
      h0_q        <= 2'b10;
      sym_valid_o <= 1'b0;
      sym_o       <= RXS_J;
    end else begin
      sym_valid_o <= 1'b0;
      if (half_ce) begin
        if (!eff_phase) begin
          h0_q    <= {dp_i, dm_i};
          phase_q <= 1'b1;
        end else begin
          sym_o       <= dec;
          sym_valid_o <= 1'b1;
          phase_q     <= 1'b0;
        end
      end else if (align_i) begin
        phase_q <= 1'b0;
      end
    end
  end

endmodule
