// UTMI control logic: mode registers and serial bit timing.
//
// OpMode and XcvrSelect are registered here so the rest of the core sees
// stable, synchronous copies. The block also produces the serial timing for
// both directions from the single core clock: half_ce pulses once per half
// bit cell, and phase tells whether the current half cell is the first (0)
// or the second (1) half of a bit. A full bit therefore takes two half_ce
// pulses; the bit boundary is half_ce && phase.
//
// Timing: the core clock runs at twice the high-speed bit rate (960 MHz for
// 480 Mbit/s). In high-speed mode (XcvrSelect = 0) half_ce is high on every
// cycle; in full-speed mode (XcvrSelect = 1) it is high once every
// FS_HALF_BIT_CLKS cycles, which gives 12 Mbit/s. The two rates are those of
// the source description; deriving both from one clock with clock enables,
// and the XcvrSelect polarity, are this design's choices.
module utmi_control
  import utmi_pkg::*;
#(
  parameter int unsigned HS_HALF_BIT_CLKS = 1,   // core clocks per HS half bit
  parameter int unsigned FS_HALF_BIT_CLKS = 40   // core clocks per FS half bit
) (
  input  logic    clk,
  input  logic    rst,            // synchronous, active high
  input  logic [1:0] opmode_i,    // OpMode[1:0]
  input  logic    xcvr_select_i,  // 0: high speed, 1: full speed
  output opmode_e opmode_o,       // registered OpMode
  output logic    fs_mode_o,      // registered XcvrSelect
  output logic    half_ce_o,      // one pulse per half bit cell
  output logic    phase_o         // 0: first half of a bit, 1: second half
);

  localparam int unsigned MAXDIV =
      (FS_HALF_BIT_CLKS > HS_HALF_BIT_CLKS) ? FS_HALF_BIT_CLKS : HS_HALF_BIT_CLKS;
  localparam int unsigned CW = (MAXDIV > 1) ? $clog2(MAXDIV) : 1;

  logic [CW-1:0] cnt_q;
  logic [CW-1:0] reload;

  always_comb reload = fs_mode_o ? CW'(FS_HALF_BIT_CLKS - 1) : CW'(HS_HALF_BIT_CLKS - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      opmode_o  <= OPMODE_NORMAL;
      fs_mode_o <= 1'b0;
    end else begin
      opmode_o  <= opmode_e'(opmode_i);
      fs_mode_o <= xcvr_select_i;
    end
  end

  // Down counter: half_ce when it reaches zero.
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q   <= '0;
      phase_o <= 1'b0;
    end else if (half_ce_o) begin
      cnt_q   <= reload;
      phase_o <= ~phase_o;
    end else begin
      cnt_q   <= cnt_q - 1'b1;
    end
  end

  always_comb half_ce_o = (cnt_q == '0) && !rst;

endmodule
