// Bit unstuffer of the receiver.
//
// Counts consecutive 1s among the decoded data bits. The bit after six 1s
// must be a stuffed 0: it is dropped (stripped_o pulses). If it is a 1
// instead, stuff_err_o pulses and the count restarts. Every other bit is
// passed on, registered: out_valid_o pulses one clock after in_valid_i.
// clear_i restarts the count at the start of a packet.
//
// The rule and the error report follow the source description.
module utmi_bit_unstuffer
  import utmi_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic clear_i,
  input  logic in_valid_i,
  input  logic in_bit_i,
  output logic out_valid_o,
  output logic out_bit_o,
  output logic stripped_o,
  output logic stuff_err_o
);

  logic [2:0] ones_q;
  logic       at_run;

  always_comb at_run = (ones_q == 3'(STUFF_RUN));

  always_ff @(posedge clk) begin
    if (rst || clear_i) begin
      ones_q      <= '0;
      out_valid_o <= 1'b0;
      out_bit_o   <= 1'b0;
      stripped_o  <= 1'b0;
      stuff_err_o <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      stripped_o  <= 1'b0;
      stuff_err_o <= 1'b0;
      if (in_valid_i) begin
        if (at_run) begin
          ones_q <= '0;
          if (in_bit_i) stuff_err_o <= 1'b1;
          else          stripped_o  <= 1'b1;
        end else begin
          out_valid_o <= 1'b1;
          out_bit_o   <= in_bit_i;
          ones_q      <= in_bit_i ? ones_q + 1'b1 : 3'd0;
        end
      end
    end
  end

endmodule
