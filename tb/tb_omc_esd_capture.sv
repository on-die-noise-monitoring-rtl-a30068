// tb_omc_esd_capture: capture of an ESD-like supply transient.
//
// Reference scenario: the sensing input and the VDD detector are both tied
// to the system VDD (3300 mV nominal here). An ESD strike into VSS appears
// as a differential-mode ringing on VDD: a damped 150 MHz sine, 1400 mV
// peak (2.8 Vpp), 20 ns decay. The clock is 320 MHz (2.56 GS/s). The trigger
// delay is set to 20 cycles so that the 100 ns record holds about 30 ns
// before the event and 70 ns after it.
//
// The capacitive attenuator in front of the ADCs is modelled here, not in
// the design: adc_vin = 900 mV + (VDD - 3300 mV) / 2, which maps 2.8 Vpp onto
// the ADC range. The testbench holds the input constant around each sampling
// instant (it changes 150 ps before each instant T0 + n*T + floor(k*T/8)), so
// every sample has an exactly known value. After the capture it reads the 256
// samples back and checks three things: each code equals the quantised
// waveform at its instant; the record ends where the hold timing says it
// must; and the waveform rebuilt from the codes matches the true VDD within
// one ADC step (112.5 mV at VDD). The VDD threshold is raised to 3800 mV for
// the 3.3 V supply.
module tb_omc_esd_capture;
  timeunit 1ps; timeprecision 1ps;
  import omc_pkg::*;

  localparam int  T      = 3125;
  localparam int  T0     = 1562;
  localparam int  NS     = DEPTH * NUM_PH;
  localparam int  SEL    = 1;
  localparam int  DLY    = 20;
  localparam real PI     = 3.14159265358979;
  localparam real VNOM   = 3300.0;
  localparam real AMP    = 1400.0;
  localparam real F_GHZ  = 0.15;
  localparam real TAU_NS = 20.0;

  logic       ref_clk = 1'b0, rst_n = 1'b1, rd_clk = 1'b0;
  mv_t        vin = 16'sd900, vdd = 16'sd3300;
  logic [4:0] out;
  logic [7:0] rd_addr;
  logic       hold, locked;
  longint     t_esd = 0;                    // 0: no strike yet
  int checks = 0, failures = 0;

  omc_top #(.VDD_THRESH_MV(3800)) dut (
    .ref_clk (ref_clk), .rst_n (rst_n), .adc_vin_mv (vin), .vdd_mv (vdd),
    .sig_mv (16'sd0), .det_sel (DET_VDD), .clk_sel (3'(SEL)), .trig_dly (5'(DLY)),
    .rd_clk (rd_clk), .out (out), .rd_addr (rd_addr), .hold (hold),
    .dll_locked (locked)
  );

  initial begin
    #(T0);
    forever begin ref_clk = 1'b1; #(T / 2); ref_clk = 1'b0; #(T - T / 2); end
  end

  function automatic longint sample_time(longint j);
    return T0 + (j / 8) * T + longint'((j % 8) * T / 8);
  endfunction

  function automatic int vdd_at(longint t);
    real x;
    if (t_esd == 0 || t < t_esd) return int'(VNOM);
    x = real'(t - t_esd) / 1000.0;          // ns since the strike
    return int'(VNOM + AMP * $exp(-x / TAU_NS) * $sin(2.0 * PI * F_GHZ * x));
  endfunction

  function automatic int code_of(int v_vdd);
    int v = 900 + (v_vdd - 3300) / 2;
    int c = 0;
    for (int i = 1; i < 32; i++) if (v * 32 >= i * 1800) c++;
    return c;
  endfunction

  // Drive the input slot by slot: value for sample j set 150 ps before it.
  initial begin
    longint j = 1;
    forever begin
      #(sample_time(j) - 150 - $time);
      vdd = mv_t'(vdd_at(sample_time(j)));
      vin = mv_t'(900 + (int'(vdd) - 3300) / 2);
      j++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint j_cross, t_det, n_det, t_hold, j_last;
    logic [4:0] smp [NS];
    int bad = 0, far = 0;
    real worst = 0.0;

    #100 rst_n = 1'b0;
    #(T * 3) rst_n = 1'b1;
    wait (locked);
    #(T * 40);
    t_esd = $time + 1234;

    // first slot whose value exceeds the threshold, and the resulting timing
    j_cross = (t_esd - T0) / (T / 8);
    while (!(sample_time(j_cross) > t_esd && vdd_at(sample_time(j_cross)) > 3800)) j_cross++;
    t_det  = sample_time(j_cross) - 150 + 2000;         // detector output rises
    n_det  = (t_det - T0 - SEL * T / 8) / T;            // last edge <= t_det
    t_hold = T0 + (n_det + DLY + 2) * T + SEL * T / 8;
    j_last = (n_det + DLY + 2) * 8 - 1;                 // newest stored sample

    wait (hold);
    check($time == t_hold, $sformatf("hold at %0d, expected %0d", $time, t_hold));
    #(T * 10);
    for (int i = 0; i < NS; i++) begin
      #100 smp[i] = out;
      #4900 rd_clk = 1'b1;
      #5000 rd_clk = 1'b0;
    end

    for (int i = 0; i < NS; i++) begin
      longint jj;
      int     v;
      real    rec, err;
      jj = j_last - (NS - 1) + i;
      v  = vdd_at(sample_time(jj));
      if (smp[i] != 5'(code_of(v))) begin
        bad++;
        if (bad < 6) $display("  sample %0d: code %0d expected %0d (VDD %0d mV)", i, smp[i], code_of(v), v);
      end
      // rebuild VDD from the code (centre of the ADC bin, undo attenuation)
      rec = 3300.0 + 2.0 * ((real'(smp[i]) + 0.5) * 1800.0 / 32.0 - 900.0);
      err = rec - real'(v);
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      if (err > 112.5 + 2.0) far++;
    end
    check(bad == 0, $sformatf("%0d of %0d codes differ from the quantised waveform", bad, NS));
    check(far == 0, $sformatf("%0d rebuilt samples off by more than one step", far));
    check(j_cross > j_last - (NS - 1) && j_cross <= j_last, "threshold crossing not inside the record");
    $display("record: %0d ns before the crossing, %0d ns after; worst rebuild error %0.1f mV",
             (j_cross - (j_last - (NS - 1))) * T / 8000, (j_last - j_cross) * T / 8000, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
