// tb_adc_align: checks the half-period retiming of ADC1..ADC3.
// Eight phase clocks (period 3200 ps, spacing 400 ps) are generated here and
// each lane's input changes to a new random code 100 ps after its own rising
// edge, as an ADC output would. For lanes 0..2 the output must keep the
// previous code until the falling edge of that lane's clock and then show the
// code sampled at the rising edge; lanes 3..7 must follow their inputs.
module tb_adc_align;
  timeunit 1ps; timeprecision 1ps;
  localparam int P = 3200;

  logic [7:0]      ph = '0;
  logic [7:0][4:0] adc = '0;
  logic [7:0][4:0] al;
  int checks = 0, failures = 0;

  adc_align dut (.ph_clk(ph[2:0]), .adc_out(adc), .aligned(al));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < 8; k++) begin : g_lane
    initial begin
      #(k * P / 8);
      forever begin
        ph[k] = 1'b1;
        #(P / 2) ph[k] = 1'b0;
        #(P / 2);
      end
    end
    int cycle = 0;
    always @(posedge ph[k]) begin
      logic [4:0] held, nv;
      held = adc[k];
      cycle++;
      #100 nv = 5'($urandom);
      adc[k] = nv;
      #10;
      if (k < 3) begin
        // the retiming register is only defined after its first edge
        if (cycle > 1) check(al[k] == held, $sformatf("lane %0d changed before T/2", k));
        @(negedge ph[k]);
        #10 check(al[k] == nv, $sformatf("lane %0d not updated at T/2", k));
      end else begin
        check(al[k] == nv, $sformatf("lane %0d does not follow its ADC", k));
      end
    end
  end

  initial begin
    #(P * 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
