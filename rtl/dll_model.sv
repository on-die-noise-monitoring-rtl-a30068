// dll_model: behavioural model of the delay-locked loop (analog block).
//
// The DLL takes the external reference clock and produces NUM_PH clocks of
// the same frequency whose rising edges are spaced by T/NUM_PH (phase k is
// delayed by k*T/NUM_PH; ph_clk[0] is ADC_INCLK1, ph_clk[7] ADC_INCLK8).
// The published design gives only this function, not the delay line or the
// phase detector, so this model measures the reference period from its
// rising edges and reproduces the phases with transport delays. It declares
// lock after LOCK_CYCLES consecutive periods of equal length (our choice; the
// lock time of the real loop is not given) and keeps its outputs low until
// then. Phase delays are rounded down to whole picoseconds.
//
// Interface: ref_clk, active-low rst_n; ph_clk[NUM_PH-1:0], locked.
// Not synthesizable: it stands in for the mixed-signal macro in simulation.
module dll_model #(
  parameter int unsigned NUM_PH      = omc_pkg::NUM_PH,
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  output logic [NUM_PH-1:0] ph_clk,
  output logic              locked
);
  timeunit 1ps; timeprecision 1ps;

  longint unsigned last_edge;
  longint unsigned period;
  int unsigned     same_cnt;
  logic            have_edge;

  // Period measurement and lock detection.
  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      have_edge = 1'b0;
      same_cnt  = 0;
      period    = 0;
      last_edge = 0;
      locked   <= 1'b0;
    end else begin
      if (have_edge) begin
        if ($time - last_edge == period) begin
          if (same_cnt < LOCK_CYCLES) same_cnt = same_cnt + 1;
        end else begin
          same_cnt = 0;
        end
        period = $time - last_edge;
      end
      last_edge = $time;
      have_edge = 1'b1;
      if (same_cnt >= LOCK_CYCLES) locked <= 1'b1;
    end
  end

  // Delayed copies of the reference clock, forced low until lock.
  for (genvar k = 0; k < NUM_PH; k++) begin : g_phase
    initial ph_clk[k] = 1'b0;
    always begin
      logic            v;
      longint unsigned d;
      @(ref_clk or locked);
      v = ref_clk & locked;
      d = k * period / NUM_PH;
      fork
        automatic logic            fv = v;
        automatic longint unsigned fd = d;
        begin
          #(fd);
          ph_clk[k] = fv;
        end
      join_none
    end
  end
endmodule
