// tb_dll_model: checks the behavioural DLL.
// A 320 MHz reference (3125 ps) is applied after reset. The test checks that
// the phases stay low before lock, that lock comes within LOCK_CYCLES+2
// reference cycles, and that every phase k then rises k*3125/8 ps (rounded
// down) after each reference edge and has the reference's period. It then
// changes the reference to 4000 ps, resets, and checks the new spacing.
module tb_dll_model;
  timeunit 1ps; timeprecision 1ps;

  logic       ref_clk = 1'b0, rst_n = 1'b1;
  logic [7:0] ph;
  logic       locked;
  int         half = 1562;
  int         per  = 3125;
  int checks = 0, failures = 0;
  longint     ref_rise;
  longint     ph_rise [8];
  int         ph_edges [8];
  int         pre_edges [8];

  dll_model dut (.ref_clk(ref_clk), .rst_n(rst_n), .ph_clk(ph), .locked(locked));

  // Reference: high for half, low for per-half.
  initial forever begin
    #(half) ref_clk = 1'b1;
    ref_rise = $time;
    #(per - half) ref_clk = 1'b0;
  end

  for (genvar k = 0; k < 8; k++) begin : g_mon
    always @(posedge ph[k]) begin
      ph_edges[k]++;
      if (locked && ph_rise[k] != 0) begin
        checks++;
        if ($time - ph_rise[k] != per) begin
          failures++;
          $display("FAIL phase %0d period %0d", k, $time - ph_rise[k]);
        end
      end
      ph_rise[k] = $time;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_and_check(int p);
    int cycles;
    per  = p;
    half = p / 2;
    rst_n = 1'b0;
    repeat (3) @(posedge ref_clk);
    #10 rst_n = 1'b1;
    foreach (ph_edges[k]) begin ph_edges[k] = 0; ph_rise[k] = 0; end
    cycles = 0;
    while (!locked && cycles < 40) begin
      pre_edges = ph_edges;     // edges seen before the locking edge
      @(posedge ref_clk);
      #1;
      cycles++;
    end
    check(locked, "DLL did not lock");
    check(cycles <= 8 + 2, $sformatf("lock took %0d cycles", cycles));
    foreach (pre_edges[k]) check(pre_edges[k] == 0, $sformatf("phase %0d toggled before lock", k));
    repeat (20) begin
      @(posedge ref_clk);
      #(p - 10);
      for (int k = 0; k < 8; k++)
        check(ph_rise[k] == ref_rise + k * p / 8,
              $sformatf("phase %0d rose at %0d, ref at %0d", k, ph_rise[k], ref_rise));
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ph_edges[k]) ph_edges[k] = 0;
    #10;
    run_and_check(3125);
    run_and_check(4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
