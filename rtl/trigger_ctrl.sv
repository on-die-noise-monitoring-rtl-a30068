// trigger_ctrl: event selection, trigger time control and hold generation.
//
// Two event detectors (VDD and Signal) watch the monitored nets; det_sel
// chooses which one may trigger a capture. The first rising edge of the
// chosen detector output clocks a 1 into the event flop, so even a
// sub-nanosecond detector pulse is remembered. The hold signal, which stops
// DFF_CLK and enables readout, is then produced in one of two ways:
//   trig_dly == 0 : hold follows the event flop directly (only the detector
//                   and gate delays, about 2 ns in the published design);
//   trig_dly == n : the event is brought into the sel_clk domain by a
//                   two-flop synchroniser and hold rises n sel_clk edges
//                   after that, i.e. on the (n+2)-th rising edge of sel_clk
//                   after the event. This lets the capture window move later
//                   so that more of the waveform after the event is kept.
// The published design names the detector selection and a "trigger time
// control logic" that can delay hold beyond the 2 ns; delaying in whole
// clock cycles, the 5-bit field and the synchroniser are our choices. hold
// stays high (so the captured data stays frozen) until rst_n is pulled low,
// which re-arms the monitor; the document does not say how hold is cleared.
//
// Interface: clk = ungated selected DLL phase, rst_n async active low,
// vdd_det / sig_det detector outputs, det_sel, trig_dly; hold, event_seen.
module trigger_ctrl #(
  parameter int unsigned DLY_BITS = omc_pkg::DLY_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vdd_det,
  input  logic                 sig_det,
  input  omc_pkg::det_sel_e    det_sel,
  input  logic [DLY_BITS-1:0]  trig_dly,
  output logic                 hold,
  output logic                 event_seen
);
  timeunit 1ps; timeprecision 1ps;
  import omc_pkg::*;

  logic                det_any;
  logic                sync1_q, sync2_q;
  logic [DLY_BITS-1:0] cnt_q;
  logic                hold_dly_q;

  assign det_any = (det_sel == DET_SIGNAL) ? sig_det : vdd_det;

  // Event flop: clocked by the detector itself, D tied high.
  always_ff @(posedge det_any or negedge rst_n) begin
    if (!rst_n) event_seen <= 1'b0;
    else        event_seen <= 1'b1;
  end

  // Delayed hold in the sel_clk domain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1_q    <= 1'b0;
      sync2_q    <= 1'b0;
      cnt_q      <= '0;
      hold_dly_q <= 1'b0;
    end else begin
      sync1_q <= event_seen;
      sync2_q <= sync1_q;
      if (sync2_q) begin
        if (cnt_q != '1) cnt_q <= cnt_q + 1'b1;
        if ({1'b0, cnt_q} + 1'b1 >= {1'b0, trig_dly}) hold_dly_q <= 1'b1;
      end
    end
  end

  assign hold = (trig_dly == '0) ? event_seen : hold_dly_q;
endmodule
