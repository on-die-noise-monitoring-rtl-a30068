// tb_adc_model: checks the behavioural 5-bit ADC.
// Random input voltages (including out-of-range ones) are applied between
// sampling edges; the code is compared with a threshold count worked out
// here (code = number of levels c*1800/32 mV, c = 1..31, that the input
// reaches), and the output delay is checked: the old code must still be
// present 100 ps after the edge and the new one 250 ps after it.
module tb_adc_model;
  timeunit 1ps; timeprecision 1ps;

  logic         clk = 1'b0;
  omc_pkg::mv_t vin = '0;
  logic [4:0]   dout;
  int checks = 0, failures = 0;

  adc_model dut (.clk(clk), .vin_mv(vin), .dout(dout));

  function automatic int expected(int v);
    int n = 0;
    for (int c = 1; c < 32; c++) if (v * 32 >= c * 1800) n++;
    return n;
  endfunction

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

  initial begin
    logic [4:0] prev;
    int v;
    #1000;
    for (int i = 0; i < 300; i++) begin
      case (i)
        0: v = -300;  1: v = 0;     2: v = 56;   3: v = 57;
        4: v = 1799;  5: v = 1800;  6: v = 2500; default: v = $urandom_range(2400) - 300;
      endcase
      vin = omc_pkg::mv_t'(v);
      prev = dout;
      #500 clk = 1'b1;
      #100 check(dout == prev, $sformatf("output changed before Tco at v=%0d", v));
      #150 check(dout == 5'(expected(v)), $sformatf("v=%0d code=%0d exp=%0d", v, dout, expected(v)));
      #1000 clk = 1'b0;
      vin = omc_pkg::mv_t'($urandom_range(1800));  // changes between edges are ignored
      #500;
      check(dout == 5'(expected(v)), "code held between edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
