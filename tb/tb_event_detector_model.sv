// tb_event_detector_model: checks the behavioural event detector.
// Steps and short pulses are applied around a 1500 mV threshold; det must
// not change within 1900 ps of a crossing, must have changed by 2100 ps
// (2 ns detector delay), must stay low at or below the threshold, and a
// 500 ps pulse must reappear as a delayed 500 ps pulse.
module tb_event_detector_model;
  timeunit 1ps; timeprecision 1ps;

  omc_pkg::mv_t v = '0;
  logic det;
  int checks = 0, failures = 0;

  event_detector_model #(.THRESH_MV(1500), .DELAY_PS(2000)) dut (.v_mv(v), .det(det));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    check(det == 1'b0, "det high at 0 mV");
    for (int i = 0; i < 40; i++) begin
      int lvl;
      logic exp, prev_det;
      lvl = (i % 2 == 0) ? 1501 + $urandom_range(800) : 1500 - $urandom_range(1600);
      exp = (lvl > 1500);
      prev_det = det;
      v = omc_pkg::mv_t'(lvl);
      #1900 check(det == prev_det, $sformatf("det moved early, level %0d", lvl));
      #200  check(det == exp, $sformatf("det=%0d for level %0d", det, lvl));
      #3000;
    end
    v = 16'sd1500;
    #3000 check(det == 1'b0, "det high exactly at threshold");
    // short pulse
    v = 16'sd2500;
    #500 v = 16'sd0;
    #1600 check(det == 1'b1, "pulse not seen");
    #500  check(det == 1'b0, "pulse too long");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
