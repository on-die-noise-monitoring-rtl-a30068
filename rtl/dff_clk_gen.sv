// dff_clk_gen: DFF_CLK generation (Selected CLK and hold gate).
//
// DFF_CLK, the clock of the capture shift register, is one of the eight DLL
// phases chosen by clk_sel ("Selected CLK"), and it is stopped by the hold
// signal: once hold is high no more edges reach the shift register, so the
// samples it holds are frozen. The published design describes the stop as an
// AND gate between the clock and the hold path. Here the gate is built as a
// conventional latch-based clock gate: the enable (not hold) is latched while
// the selected clock is low, so a hold that rises in the middle of a high
// phase cannot shorten that pulse. The latch is therefore intended. The
// selection is meant to be static (set before capturing); changing clk_sel
// while running may produce a short pulse.
//
// Interface: ph_clk[NUM_PH-1:0], clk_sel (0 = ADC_INCLK1), hold;
// sel_clk = selected phase (ungated), dff_clk = gated clock.
// Timing: the first suppressed edge is the first rising edge of the selected
// phase that follows a falling edge seen with hold already high.
module dff_clk_gen #(
  parameter int unsigned NUM_PH = omc_pkg::NUM_PH
) (
  input  logic [NUM_PH-1:0]         ph_clk,
  input  logic [$clog2(NUM_PH)-1:0] clk_sel,
  input  logic                      hold,
  output logic                      sel_clk,
  output logic                      dff_clk
);
  timeunit 1ps; timeprecision 1ps;

  logic en_lat;

  assign sel_clk = ph_clk[clk_sel];

  always_latch begin
    if (!sel_clk) en_lat = !hold;
  end

  assign dff_clk = sel_clk & en_lat;
endmodule
