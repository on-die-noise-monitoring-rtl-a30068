// tb_dff_clk_gen: checks phase selection and hold gating of DFF_CLK.
// Eight phase clocks (period 3200 ps) are generated here. For every clk_sel
// value the selected clock must rise at that phase's time and dff_clk must
// match it while hold is low. Hold is then raised in the middle of a high
// phase: that pulse must still be full length (1600 ps) and no further edge
// may appear; after hold falls edges return.
module tb_dff_clk_gen;
  timeunit 1ps; timeprecision 1ps;
  localparam int P = 3200;

  logic [7:0] ph = '0;
  logic [2:0] sel = '0;
  logic       hold = 1'b0;
  logic       sel_clk, dff_clk;
  int checks = 0, failures = 0;
  int dff_edges = 0;
  longint t0;

  dff_clk_gen dut (.ph_clk(ph), .clk_sel(sel), .hold(hold), .sel_clk(sel_clk), .dff_clk(dff_clk));

  for (genvar k = 0; k < 8; k++) begin : g_ph
    initial begin
      #(P + k * P / 8);
      forever begin
        ph[k] = 1'b1;
        #(P / 2) ph[k] = 1'b0;
        #(P / 2);
      end
    end
  end

  always @(posedge dff_clk) dff_edges++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(P * 2 + 50);
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #(P * 2);
      @(posedge dff_clk);
      check(($time % P) == s * P / 8, $sformatf("sel %0d: edge at %0d", s, $time % P));
      check(sel_clk == 1'b1, "sel_clk not high with dff_clk");
      repeat (4) begin
        @(posedge sel_clk);
        #1 check(dff_clk == 1'b1, $sformatf("sel %0d: dff_clk missing", s));
        @(negedge sel_clk);
        #1 check(dff_clk == 1'b0, $sformatf("sel %0d: dff_clk stuck", s));
      end
      // hold raised 400 ps into a high phase
      @(posedge sel_clk);
      t0 = $time;
      #400 hold = 1'b1;
      @(negedge dff_clk);
      check($time - t0 == P / 2, $sformatf("sel %0d: pulse cut to %0d ps", s, $time - t0));
      dff_edges = 0;
      #(P * 5);
      check(dff_edges == 0, $sformatf("sel %0d: %0d edges while hold", s, dff_edges));
      hold = 1'b0;
      #(P * 3);
      check(dff_edges >= 2, $sformatf("sel %0d: no edges after hold released", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
