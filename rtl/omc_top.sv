// omc_top: on-die noise monitoring circuit (OMC).
//
// The monitor records the waveform of a transient (for example ESD-induced
// noise between VDD and VSS) inside the chip, without cables or probes.
// A DLL turns the external reference clock (period T) into eight clocks
// spaced T/8 apart; each clocks one of eight 5-bit ADCs on the attenuated
// sensing input, so together they sample at 8/T (2.56 GS/s at 320 MHz).
// The outputs of ADC1..ADC3 are retimed by T/2 so that one DFF_CLK, a
// selectable DLL phase, can load all eight into a shift register that keeps
// the latest DEPTH frames (32 frames = 256 samples = 100 ns at 320 MHz).
// An event detector on VDD or on a signal net raises hold when the net
// crosses its threshold, optionally after a programmable delay; hold stops
// DFF_CLK, freezing the waveform around the event, and enables readout: each
// edge of the external read clock advances a binary counter and the next
// stored sample (oldest first) appears on the 5-bit output OUT1..OUT5.
//
// The block structure, the clock scheme, the half-period retiming of
// ADC1..ADC3, the hold gating and the counter readout follow the published
// circuit. Analog parts are behavioural models (DLL, ADCs, detectors); the
// supply regulator and the C1/C2 attenuator have no model, so the ADC input
// (after attenuation) and the two detector nets are ports in millivolts.
// The clock-phase select, the detector select and the trigger delay are
// static configuration pins (the evaluation board sets them with switches);
// rst_n clears the capture and re-arms the trigger.
//
// Timing: after DLL lock, one frame enters the shift register per reference
// cycle. hold rises about 2 ns after the monitored net exceeds the threshold
// (trig_dly = 0) or on the (trig_dly+2)-th selected-clock edge after it.
module omc_top #(
  parameter int unsigned DEPTH         = omc_pkg::DEPTH,
  parameter int          VDD_THRESH_MV = 2000,
  parameter int          SIG_THRESH_MV = 2000
) (
  input  logic                              ref_clk,
  input  logic                              rst_n,
  input  omc_pkg::mv_t                      adc_vin_mv,
  input  omc_pkg::mv_t                      vdd_mv,
  input  omc_pkg::mv_t                      sig_mv,
  input  omc_pkg::det_sel_e                 det_sel,
  input  logic [$clog2(omc_pkg::NUM_PH)-1:0] clk_sel,
  input  logic [omc_pkg::DLY_BITS-1:0]      trig_dly,
  input  logic                              rd_clk,
  output logic [omc_pkg::ADC_BITS-1:0]      out,
  output logic [$clog2(DEPTH*omc_pkg::NUM_PH)-1:0] rd_addr,
  output logic                              hold,
  output logic                              dll_locked
);
  timeunit 1ps; timeprecision 1ps;
  import omc_pkg::*;

  logic [NUM_PH-1:0] ph_clk;
  frame_t            adc_out;
  frame_t            aligned;
  frame_t            frames [DEPTH];
  logic              sel_clk, dff_clk;
  logic              vdd_det, sig_det, event_seen;

  dll_model u_dll (
    .ref_clk (ref_clk),
    .rst_n   (rst_n),
    .ph_clk  (ph_clk),
    .locked  (dll_locked)
  );

  for (genvar k = 0; k < NUM_PH; k++) begin : g_adc
    adc_model u_adc (
      .clk    (ph_clk[k]),
      .vin_mv (adc_vin_mv),
      .dout   (adc_out[k])
    );
  end

  adc_align u_align (
    .ph_clk  (ph_clk[NUM_LATE-1:0]),
    .adc_out (adc_out),
    .aligned (aligned)
  );

  dff_clk_gen u_clkgen (
    .ph_clk  (ph_clk),
    .clk_sel (clk_sel),
    .hold    (hold),
    .sel_clk (sel_clk),
    .dff_clk (dff_clk)
  );

  shift_register #(.DEPTH(DEPTH)) u_sreg (
    .clk   (dff_clk),
    .rst_n (rst_n),
    .d     (aligned),
    .q     (frames)
  );

  event_detector_model #(.THRESH_MV(VDD_THRESH_MV)) u_vdd_det (
    .v_mv (vdd_mv),
    .det  (vdd_det)
  );

  event_detector_model #(.THRESH_MV(SIG_THRESH_MV)) u_sig_det (
    .v_mv (sig_mv),
    .det  (sig_det)
  );

  trigger_ctrl u_trig (
    .clk        (sel_clk),
    .rst_n      (rst_n),
    .vdd_det    (vdd_det),
    .sig_det    (sig_det),
    .det_sel    (det_sel),
    .trig_dly   (trig_dly),
    .hold       (hold),
    .event_seen (event_seen)
  );

  readout #(.DEPTH(DEPTH)) u_rd (
    .rd_clk  (rd_clk),
    .rst_n   (rst_n),
    .hold    (hold),
    .frames  (frames),
    .out     (out),
    .rd_addr (rd_addr)
  );

  // The capture window only makes sense once the sampling clocks run.
  a_hold_after_lock: assert property (@(posedge sel_clk) disable iff (!rst_n)
                                      $rose(event_seen) |-> dll_locked)
    else $warning("event captured before the DLL locked");
endmodule
