// EOP generator of the transmitter.
//
// While eop_enable_i is high it offers the end-of-packet symbols to the
// encoder, one per bit boundary: SE0, SE0 (both wires low), then J (DP high,
// DM low). done_o rises after the J has been taken and stays high until
// eop_enable_i falls, which also rewinds the sequence.
//
// The pattern follows the source description (two single-ended zeros and a
// J); one symbol per bit time is this design's reading of "two clock
// cycles".
module utmi_eop_gen
  import utmi_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    eop_enable_i,
  input  logic    bit_ce,       // bit boundary: the encoder takes sym_o
  output logic    sym_valid_o,
  output tx_sym_e sym_o,
  output logic    done_o
);

  logic [1:0] idx_q;   // 0,1: SE0  2: J  3: done

  always_ff @(posedge clk) begin
    if (rst || !eop_enable_i) idx_q <= '0;
    else if (bit_ce && idx_q != 2'd3) idx_q <= idx_q + 1'b1;
  end

  always_comb begin
    sym_valid_o = eop_enable_i && (idx_q != 2'd3);
    sym_o       = (idx_q == 2'd2) ? TXS_J : TXS_SE0;
    done_o      = eop_enable_i && (idx_q == 2'd3);
  end

endmodule
