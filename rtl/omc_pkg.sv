// omc_pkg: constants and types shared by the on-die noise monitor.
//
// The monitor samples one analog node with eight 5-bit ADCs whose sampling
// clocks are spaced by 1/8 of the reference-clock period, so every reference
// cycle yields one "frame" of eight consecutive samples. Frames are kept in a
// shift register until an event freezes it, then read out one sample at a
// time. The numbers below follow the published design: eight ADCs and eight
// DLL phases, 5-bit samples, the first three ADC outputs retimed by half a
// period, and a 100 ns capture window at a 320 MHz reference clock
// (100 ns / 3.125 ns = 32 frames, 256 samples). The width of the analog test
// values (signed millivolts) and the trigger-delay field are our own choices.
package omc_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NUM_PH    = 8;   // DLL phases = interleaved ADCs
  localparam int unsigned ADC_BITS  = 5;   // resolution of each ADC
  localparam int unsigned NUM_LATE  = 3;   // ADC1..ADC3 retimed by T/2
  localparam int unsigned DEPTH     = 32;  // frames held: 100 ns at 320 MHz
  localparam int unsigned DLY_BITS  = 5;   // trigger-delay control field
  localparam int unsigned MV_BITS   = 16;  // analog values as signed mV

  typedef logic [ADC_BITS-1:0]              sample_t;
  typedef logic [NUM_PH-1:0][ADC_BITS-1:0]  frame_t;   // [k] = ADC(k+1)
  typedef logic signed [MV_BITS-1:0]        mv_t;

  // Which event detector is allowed to raise the hold signal.
  typedef enum logic {
    DET_VDD    = 1'b0,
    DET_SIGNAL = 1'b1
  } det_sel_e;
endpackage
