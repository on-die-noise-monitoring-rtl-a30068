// adc_align: half-period retiming of the early ADC outputs.
//
// ADCn samples on DLL phase n, so the eight 5-bit outputs change at eight
// different instants spread over one reference period T. To let a single
// clock (DFF_CLK) capture all eight at once, the outputs of the first
// NUM_LATE converters (ADC1..ADC3) are re-registered on the falling edge of
// their own sampling clock, i.e. T/2 after they were sampled. All eight
// outputs then change within a window of about T/2 and stay stable for the
// other T/2, which is the timing margin left for DFF_CLK. This follows the
// published design; the use of falling-edge registers to obtain the half
// period delay is our reading of it.
//
// Interface: ph_clk[NUM_LATE-1:0] (ADC_INCLK1..3), adc_out[k] = ADC(k+1)_OUT;
// aligned[k] is the same sample, delayed by T/2 for k < NUM_LATE.
// Timing: aligned[k] for k < NUM_LATE updates on the falling edge of
// ph_clk[k]; the other lanes are the converter outputs unchanged.
module adc_align #(
  parameter int unsigned NUM_PH   = omc_pkg::NUM_PH,
  parameter int unsigned ADC_BITS = omc_pkg::ADC_BITS,
  parameter int unsigned NUM_LATE = omc_pkg::NUM_LATE
) (
  input  logic [NUM_LATE-1:0]              ph_clk,
  input  logic [NUM_PH-1:0][ADC_BITS-1:0]  adc_out,
  output logic [NUM_PH-1:0][ADC_BITS-1:0]  aligned
);
  timeunit 1ps; timeprecision 1ps;

  for (genvar k = 0; k < NUM_PH; k++) begin : g_lane
    if (k < NUM_LATE) begin : g_late
      logic [ADC_BITS-1:0] late_q;
      always_ff @(negedge ph_clk[k]) late_q <= adc_out[k];
      assign aligned[k] = late_q;
    end else begin : g_direct
      assign aligned[k] = adc_out[k];
    end
  end
endmodule
