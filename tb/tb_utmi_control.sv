// Testbench of utmi_control: half-bit strobe spacing at high and full
// speed, phase toggling, and registered OpMode/XcvrSelect.
`timescale 1ns/1ps
module tb_utmi_control;
  import utmi_pkg::*;
  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst, xs, fs, hce, ph;
  logic [1:0] om;
  opmode_e omq;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  utmi_control dut (.clk, .rst, .opmode_i(om), .xcvr_select_i(xs),
                    .opmode_o(omq), .fs_mode_o(fs), .half_ce_o(hce), .phase_o(ph));

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last, gap;
    logic pph;
    rst = 1; om = 0; xs = 0;
    repeat (3) @(negedge clk);
    check(!hce, "no strobe in reset");
    rst = 0;
    @(negedge clk);
    // high speed: strobe on every clock, phase alternates
    pph = ph;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      check(hce, "HS: strobe every clock");
      check(ph != pph, "HS: phase toggles each half bit");
      pph = ph;
    end
    // OpMode register
    for (int m = 0; m < 4; m++) begin
      om = 2'(m); @(negedge clk);
      check(omq == opmode_e'(m), $sformatf("OpMode %0d registered", m));
    end
    // full speed: strobe every 40 clocks
    xs = 1; @(negedge clk); check(fs, "XcvrSelect registered");
    do @(negedge clk); while (!hce);
    do @(negedge clk); while (!hce);
    for (int k = 0; k < 6; k++) begin
      gap = 0;
      do begin @(negedge clk); gap++; end while (!hce);
      check(gap == 40, $sformatf("FS: strobe gap %0d, expected 40", gap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
