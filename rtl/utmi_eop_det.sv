// EOP detector of the receiver.
//
// A small state machine over the decoded bit-time symbols: it counts SE0
// bits and, when a J follows at least two of them, pulses eop_detect_o for
// one clock. Any other symbol starts it over.
//
// The pattern (two single-ended zeros followed by J) follows the source
// description; accepting more than two SE0 bits is this design's choice.
module utmi_eop_det
  import utmi_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    sym_valid_i,
  input  rx_sym_e sym_i,
  output logic    eop_detect_o
);

  typedef enum logic [1:0] {E_IDLE, E_SE0_1, E_SE0_2} eop_state_e;
  eop_state_e st_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q         <= E_IDLE;
      eop_detect_o <= 1'b0;
    end else begin
      eop_detect_o <= 1'b0;
      if (sym_valid_i) begin
        unique case (st_q)
          E_IDLE:  st_q <= (sym_i == RXS_SE0) ? E_SE0_1 : E_IDLE;
          E_SE0_1: st_q <= (sym_i == RXS_SE0) ? E_SE0_2 : E_IDLE;
          E_SE0_2: begin
            if (sym_i == RXS_SE0) st_q <= E_SE0_2;
            else begin
              st_q <= E_IDLE;
              if (sym_i == RXS_J) eop_detect_o <= 1'b1;
            end
          end
          default: st_q <= E_IDLE;
        endcase
      end
    end
  end

endmodule
