// Manchester encoder and line driver control.
//
// At each bit boundary (half_ce with phase_i = 1) the encoder takes the
// next bit-time symbol and then drives DP/DM for its two half cells:
//   data 1 : DP low, then high (mid-cell rising edge), DM = ~DP
//   data 0 : DP high, then low (mid-cell falling edge), DM = ~DP
//   SE0    : DP = DM = 0 for the whole bit;  J : DP = 1, DM = 0
//   idle   : drivers off (oe_o = 0), the bus rests in J
// OpMode 2 sends data unencoded: 1 as J and 0 as K (DP = 0, DM = 1) for the
// whole bit. OpMode 1 releases the drivers (oe_o = 0) whatever is sent.
// Outputs are registered and change right after a half_ce edge, so each
// half cell lasts exactly one half_ce period.
//
// The coding rules and the modes follow the source description; the
// registered outputs and the idle handling are this design's.
module utmi_manchester_enc
  import utmi_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    half_ce,   // half-bit strobe
  input  logic    phase_i,   // half now ending: 0 first, 1 second
  input  opmode_e opmode_i,
  input  tx_sym_e sym_i,     // next bit-time symbol, taken at a bit boundary
  output logic    dp_o,
  output logic    dm_o,
  output logic    oe_o       // drive DP/DM
);

  tx_sym_e sym_q, nsym;
  logic    nphase;           // half about to start
  logic    ndp, ndm, noe;

  always_comb begin
    nphase = ~phase_i;
    nsym   = phase_i ? sym_i : sym_q;
    ndp = 1'b1; ndm = 1'b0; noe = 1'b1;
    unique case (nsym)
      TXS_DATA0, TXS_DATA1: begin
        if (opmode_i == OPMODE_RAW) begin
          ndp = (nsym == TXS_DATA1);          // 1 -> J, 0 -> K
        end else begin
          // first half carries ~bit, second half the bit
          ndp = (nsym == TXS_DATA1) ? nphase : ~nphase;
        end
        ndm = ~ndp;
      end
      TXS_SE0: begin ndp = 1'b0; ndm = 1'b0; end
      TXS_J:   begin ndp = 1'b1; ndm = 1'b0; end
      default: begin ndp = 1'b1; ndm = 1'b0; noe = 1'b0; end
    endcase
    if (opmode_i == OPMODE_NONDRIVE) noe = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sym_q <= TXS_IDLE;
      dp_o  <= 1'b1;
      dm_o  <= 1'b0;
      oe_o  <= 1'b0;
    end else if (half_ce) begin
      sym_q <= nsym;
      dp_o  <= ndp;
      dm_o  <= ndm;
      oe_o  <= noe;
    end
  end

endmodule
