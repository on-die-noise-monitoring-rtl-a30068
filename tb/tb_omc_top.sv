// tb_omc_top: end-to-end test of the noise monitor at its default size.
//
// A 320 MHz reference clock (T = 3125 ps) drives the DLL. The ADC input is a
// staircase that steps every T/8: step j (counted from the first reference
// edge) carries code j mod 32, so each sample read back tells at which
// instant it was taken. After the DLL has locked and the 32-frame memory has
// filled, a spike is put on the selected detector net. From the spike time
// alone the test works out when hold must rise and which DFF_CLK edge was the
// last one, hence the index of the newest stored sample. It then reads all
// 256 samples with the read clock and checks that they are 256 consecutive
// steps ending at that index (time order, 2.56 GS/s, all eight ADCs aligned).
//
// Scenarios: VDD detector with no trigger delay; Signal detector with a
// 4-cycle trigger delay, after a spike on the unselected VDD net that must be
// ignored; VDD detector on another DFF_CLK phase with the memory re-read
// after a pause (it must not change while hold is high) and the read counter
// wrapping. Each mechanism is counted and one that never happens fails.
module tb_omc_top;
  timeunit 1ps; timeprecision 1ps;
  import omc_pkg::*;

  localparam int T     = 3125;
  localparam int T0    = 1562;              // first reference rising edge
  localparam int NS    = DEPTH * NUM_PH;    // 256 samples
  localparam int DET_D = 2000;              // detector delay

  logic       ref_clk = 1'b0, rst_n = 1'b1, rd_clk = 1'b0;
  mv_t        vin = '0, vdd = 16'sd1000, sig = 16'sd0;
  det_sel_e   det_sel = DET_VDD;
  logic [2:0] clk_sel = 3'd1;
  logic [4:0] trig_dly = '0;
  logic [4:0] out;
  logic [7:0] rd_addr;
  logic       hold, locked;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lock = 0, n_vdd_trig = 0, n_sig_trig = 0, n_ignored = 0, n_delayed = 0;
  int n_frozen = 0, n_wrap = 0, n_phase_sel = 0, n_full_read = 0;

  omc_top dut (
    .ref_clk (ref_clk), .rst_n (rst_n), .adc_vin_mv (vin), .vdd_mv (vdd),
    .sig_mv (sig), .det_sel (det_sel), .clk_sel (clk_sel), .trig_dly (trig_dly),
    .rd_clk (rd_clk), .out (out), .rd_addr (rd_addr), .hold (hold),
    .dll_locked (locked)
  );

  initial begin
    #(T0);
    forever begin ref_clk = 1'b1; #(T / 2); ref_clk = 1'b0; #(T - T / 2); end
  end

  // Staircase input: code (step mod 32), placed mid-way inside an ADC bin.
  function automatic int step_at(longint t);
    return int'(((t - T0) * 8 + T / 2) / T);
  endfunction
  initial forever begin
    int c;
    c   = step_at($time) % 32;
    vin = mv_t'(c * 1800 / 32 + 20);
    #10;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Time of rising edge number n of DLL phase s (integer-ps phase delays).
  function automatic longint phase_edge(longint n, int s);
    return T0 + n * T + longint'(s * T / 8);
  endfunction

  // Read all samples; returns them in time order.
  task automatic read_all(output logic [4:0] smp [NS]);
    for (int i = 0; i < NS; i++) begin
      #100;
      check(rd_addr == 8'(i), $sformatf("read address %0d, expected %0d", rd_addr, i));
      smp[i] = out;
      #4900 rd_clk = 1'b1;
      #5000 rd_clk = 1'b0;
    end
    #100;
    if (rd_addr == 0) n_wrap++;
    check(rd_addr == 0, "read counter did not wrap after 256 reads");
  endtask

  task automatic capture(det_sel_e ds, int dly, int sel, bit decoy, bit reread);
    longint te, th_exp, tl, n_last;
    int     last_step;
    logic [4:0] smp [NS];
    logic [4:0] smp2 [NS];

    rst_n    = 1'b0;
    det_sel  = ds;
    trig_dly = 5'(dly);
    clk_sel  = 3'(sel);
    #(T * 3);
    rst_n = 1'b1;
    wait (locked);
    n_lock++;
    #(T * 40);                              // fill all 32 frames
    if (decoy) begin                        // spike on the unselected net
      if (ds == DET_SIGNAL) vdd = 16'sd2600; else sig = 16'sd2600;
      #1500;
      vdd = 16'sd1000; sig = 16'sd0;
      #(T * 20);
      check(hold == 1'b0, "unselected detector raised hold");
      if (!hold) n_ignored++;
    end
    // spike on the selected net, away from any DFF_CLK edge by > 50 ps
    #($urandom_range(T - 1));
    while (((($time + DET_D - T0 - sel * T / 8) % T) < 50) ||
           ((($time + DET_D - T0 - sel * T / 8) % T) > T - 50)) #7;
    te = $time;
    if (ds == DET_SIGNAL) sig = 16'sd2400; else vdd = 16'sd2400;
    #800;
    vdd = 16'sd1000; sig = 16'sd0;

    // expected hold time and last DFF_CLK edge
    n_last = (te + DET_D - T0 - sel * T / 8) / T;       // last edge <= te+2ns
    if (dly == 0) begin
      th_exp = te + DET_D;
      tl     = phase_edge(n_last, sel);
    end else begin
      th_exp = phase_edge(n_last + dly + 2, sel);
      tl     = th_exp;
    end
    wait (hold);
    check($time == th_exp, $sformatf("hold at %0d, expected %0d", $time, th_exp));
    if (ds == DET_VDD) n_vdd_trig++; else n_sig_trig++;
    if (dly != 0 && $time == th_exp) n_delayed++;
    if (sel != 1) n_phase_sel++;
    // the frame loaded at reference cycle m holds the samples of cycle m-1
    last_step = int'((tl - longint'(sel * T / 8) - T0) / T) * 8 - 1;

    #(T * 10);
    read_all(smp);
    begin
      int bad = 0;
      for (int i = 0; i < NS; i++)
        if (smp[i] != 5'((last_step - (NS - 1) + i) % 32)) bad++;
      check(bad == 0, $sformatf("%0d of %0d samples wrong (newest step %0d)", bad, NS, last_step));
      if (bad == 0) n_full_read++;
      if (bad != 0)
        for (int i = NS - 12; i < NS; i++)
          $display("  sample %0d = %0d expected %0d", i, smp[i], (last_step - (NS - 1) + i) % 32);
    end
    if (reread) begin
      #(T * 200);
      read_all(smp2);
      check(smp2 == smp, "stored waveform changed while hold was high");
      if (smp2 == smp) n_frozen++;
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    capture(DET_VDD,    0, 1, 1'b0, 1'b0);
    capture(DET_SIGNAL, 4, 1, 1'b1, 1'b0);
    capture(DET_VDD,    0, 3, 1'b1, 1'b1);
    capture(DET_SIGNAL, 0, 0, 1'b0, 1'b0);
    capture(DET_VDD,   17, 2, 1'b0, 1'b0);
    check(n_lock      > 0, "DLL lock never happened");
    check(n_vdd_trig  > 0, "no VDD-detector trigger");
    check(n_sig_trig  > 0, "no Signal-detector trigger");
    check(n_ignored   > 0, "unselected detector never tested");
    check(n_delayed   > 0, "delayed trigger never happened");
    check(n_phase_sel > 0, "no other DFF_CLK phase used");
    check(n_frozen    > 0, "freeze under hold never shown");
    check(n_wrap      > 0, "read counter never wrapped");
    check(n_full_read > 0, "no complete correct readout");
    $display("mechanisms: lock=%0d vdd_trig=%0d sig_trig=%0d ignored=%0d delayed=%0d phase_sel=%0d frozen=%0d wrap=%0d full_reads=%0d",
             n_lock, n_vdd_trig, n_sig_trig, n_ignored, n_delayed, n_phase_sel, n_frozen, n_wrap, n_full_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
