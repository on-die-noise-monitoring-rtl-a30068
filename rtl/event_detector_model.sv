// event_detector_model: behavioural model of the VDD / Signal event detector.
//
// The detector watches one net (VDD or a signal line, as signed millivolts)
// and drives det from 0 to 1 while the net is above its threshold voltage; it
// returns to 0 when the net falls back below. The published design gives
// this function and a total delay of about 2 ns through the detector and the
// logic behind it, which is modelled as a transport delay DELAY_PS on det.
// The comparator circuit and the threshold values are not given: THRESH_MV
// is a parameter, by default 2000 mV (our choice).
//
// Interface: v_mv in, det out. Not synthesizable: it stands in for an analog
// comparator.
module event_detector_model #(
  parameter int          THRESH_MV = 2000,
  parameter int unsigned DELAY_PS  = 2000
) (
  input  omc_pkg::mv_t v_mv,
  output logic         det
);
  timeunit 1ps; timeprecision 1ps;

  initial det = 1'b0;

  // Transport delay: every change of the comparison reaches det DELAY_PS
  // later, so pulses shorter than the delay are kept.
  always begin
    logic above;
    @(v_mv);
    above = int'(v_mv) > THRESH_MV;
    fork
      automatic logic a = above;
      begin
        #(DELAY_PS);
        det = a;
      end
    join_none
  end
endmodule
