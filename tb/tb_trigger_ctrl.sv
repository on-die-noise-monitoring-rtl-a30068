// tb_trigger_ctrl: checks detector selection, trigger delay and hold.
// A 3125 ps clock runs throughout. For each case the monitor is re-armed
// with rst_n, a 300 ps pulse is put on one detector input at a random offset
// inside a clock period, and the rising edge of hold is timed:
//   trig_dly = 0 : hold must already be high 1 ps after the pulse starts;
//   trig_dly = n : hold must rise exactly on the (n+2)-th clock edge after
//                  the pulse.
// A pulse on the detector that is not selected must never raise hold, and
// hold must stay high after the pulse until the next re-arm.
module tb_trigger_ctrl;
  timeunit 1ps; timeprecision 1ps;
  import omc_pkg::*;
  localparam int P = 3125;

  logic clk = 1'b0, rst_n = 1'b1;
  logic vdd_det = 1'b0, sig_det = 1'b0;
  det_sel_e sel = DET_VDD;
  logic [4:0] dly = '0;
  logic hold, event_seen;
  int checks = 0, failures = 0;
  int edges = 0;

  trigger_ctrl dut (.clk(clk), .rst_n(rst_n), .vdd_det(vdd_det), .sig_det(sig_det),
                    .det_sel(sel), .trig_dly(dly), .hold(hold), .event_seen(event_seen));

  initial forever begin #(P / 2) clk = 1'b1; edges++; #(P - P / 2) clk = 1'b0; end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(bit on_sig);
    if (on_sig) sig_det = 1'b1; else vdd_det = 1'b1;
    #300;
    sig_det = 1'b0;
    vdd_det = 1'b0;
  endtask

  task automatic run_case(det_sel_e s, bit on_sig, int n);
    int e0;
    bit expect_trig = (s == DET_SIGNAL) == on_sig;
    rst_n = 1'b0;
    sel = s;
    dly = 5'(n);
    #(P * 2);
    @(negedge clk);
    rst_n = 1'b1;
    #(P);
    @(posedge clk);
    #($urandom_range(P - 400) + 50);
    check(hold == 1'b0, "hold high before event");
    e0 = edges;
    fork pulse(on_sig); join_none
    #1;
    if (!expect_trig) begin
      #(P * 40);
      check(hold == 1'b0, $sformatf("unselected detector triggered (sel=%0d)", s));
      check(event_seen == 1'b0, "event flagged from unselected detector");
    end else if (n == 0) begin
      check(hold == 1'b1, "hold not immediate with trig_dly=0");
      #(P * 10) check(hold == 1'b1, "hold not sticky");
    end else begin
      while (!hold && edges - e0 < n + 10) @(posedge clk or posedge hold) #1;
      check(edges - e0 == n + 2, $sformatf("dly=%0d: hold after %0d edges", n, edges - e0));
      #(P * 10) check(hold == 1'b1, "delayed hold not sticky");
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    run_case(DET_VDD, 1'b0, 0);
    run_case(DET_SIGNAL, 1'b1, 0);
    run_case(DET_VDD, 1'b1, 0);
    run_case(DET_SIGNAL, 1'b0, 3);
    for (int n = 1; n < 32; n += 3) run_case(DET_VDD, 1'b0, n);
    run_case(DET_SIGNAL, 1'b1, 31);
    run_case(DET_SIGNAL, 1'b1, 1);
    rst_n = 1'b0;
    #10 check(hold == 1'b0 && event_seen == 1'b0, "re-arm does not clear hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
