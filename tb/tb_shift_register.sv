// tb_shift_register: checks the capture shift register (default depth 32).
// Random frames are clocked in while a queue here keeps the history; after
// every edge each stage must equal the frame written that many edges ago.
// With the clock stopped the contents must not change, and an asynchronous
// reset must clear every stage.
module tb_shift_register;
  timeunit 1ps; timeprecision 1ps;
  localparam int DEPTH = 32;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [7:0][4:0] d = '0;
  logic [7:0][4:0] q [DEPTH];
  logic [7:0][4:0] hist [$];
  int checks = 0, failures = 0;

  shift_register dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all(string when);
    for (int i = 0; i < DEPTH; i++) begin
      logic [7:0][4:0] e = (i < hist.size()) ? hist[i] : '0;
      check(q[i] == e, $sformatf("%s: stage %0d", when, i));
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 rst_n = 1'b0;
    #50 check_all("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 80; n++) begin
      d = {$urandom, $urandom};
      #500 clk = 1'b1;
      hist.push_front(d);
      #500 clk = 1'b0;
      d = {$urandom, $urandom};   // input moves without a clock edge
      #500 check_all($sformatf("edge %0d", n));
    end
    #20000 check_all("clock stopped");
    rst_n = 1'b0;
    hist.delete();
    #100 check_all("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
