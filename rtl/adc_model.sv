// adc_model: behavioural model of one 5-bit sampling ADC (analog block).
//
// On each rising edge of its sampling clock the model quantises the input
// voltage, given as signed millivolts, uniformly over [VLO_MV, VHI_MV) into
// 2**ADC_BITS codes (straight binary, clamped at both ends), and presents the
// code TCO_PS later. The published design gives the resolution (5 bits) and
// that each of the eight ADCs is clocked by its own DLL phase; the converter
// architecture, its input range and its output delay are not given, so the
// range 0..1800 mV (the 1.8 V regulated supply) and the 200 ps output delay
// are our assumptions.
//
// Interface: clk (ADC_INCLKn), vin_mv; dout (ADCn_OUT).
// Not synthesizable as intended: it stands in for the analog converter.
module adc_model #(
  parameter int unsigned ADC_BITS = omc_pkg::ADC_BITS,
  parameter int          VLO_MV   = 0,
  parameter int          VHI_MV   = 1800,
  parameter int unsigned TCO_PS   = 200
) (
  input  logic                  clk,
  input  omc_pkg::mv_t          vin_mv,
  output logic [ADC_BITS-1:0]   dout
);
  timeunit 1ps; timeprecision 1ps;

  localparam int CODES = 2 ** ADC_BITS;

  function automatic logic [ADC_BITS-1:0] quantise(input int v);
    int c;
    if (v <= VLO_MV) return '0;
    c = ((v - VLO_MV) * CODES) / (VHI_MV - VLO_MV);
    if (c >= CODES) c = CODES - 1;
    return c[ADC_BITS-1:0];
  endfunction

  initial dout = '0;

  // The input is sampled at the edge; the code appears TCO_PS later.
  always begin
    logic [ADC_BITS-1:0] code;
    @(posedge clk);
    code = quantise(int'(vin_mv));
    fork
      automatic logic [ADC_BITS-1:0] fc = code;
      begin
        #(TCO_PS);
        dout = fc;
      end
    join_none
  end
endmodule
