// Receive shift and hold registers (serial-to-parallel conversion).
//
// Unstuffed bits enter the shift register least significant bit first.
// When the eighth bit is in, the full byte is held for one clock and then
// copied into the hold register, which drives the parallel receive data;
// byte_ready_o pulses in the clock the new byte first appears on hold_o.
// clear_i discards a partial byte at the start of a packet.
//
// The hold-for-one-clock behaviour follows the source description; the bit
// order is this design's choice and matches the transmitter.
module utmi_rx_shift (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear_i,
  input  logic       in_valid_i,
  input  logic       in_bit_i,
  output logic [7:0] hold_o,
  output logic       byte_ready_o
);

  logic [7:0] shift_q;
  logic [3:0] cnt_q;
  logic       full_q;

  always_ff @(posedge clk) begin
    if (rst || clear_i) begin
      shift_q      <= '0;
      cnt_q        <= '0;
      full_q       <= 1'b0;
      byte_ready_o <= 1'b0;
      if (rst) hold_o <= '0;
    end else begin
      full_q       <= 1'b0;
      byte_ready_o <= 1'b0;
      if (full_q) begin
        hold_o       <= shift_q;
        byte_ready_o <= 1'b1;
      end
      if (in_valid_i) begin
        shift_q <= {in_bit_i, shift_q[7:1]};
        if (cnt_q == 4'd7) begin
          cnt_q  <= '0;
          full_q <= 1'b1;
        end else begin
          cnt_q  <= cnt_q + 1'b1;
        end
      end
    end
  end

endmodule
