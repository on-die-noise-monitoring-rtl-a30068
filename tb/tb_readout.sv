// tb_readout: checks the read-clock readout of the capture memory.
// The 32 frames are filled with a known pattern (sample value worked out
// from its frame and lane). With hold low the counter must stay at 0 and
// ignore rd_clk. With hold high, read n (n = 0..255) must return the sample
// of frame 31 - n/8, lane n%8, i.e. the oldest sample first; after 256 reads
// the counter wraps; with hold low it keeps its value, and rst_n clears it.
module tb_readout;
  timeunit 1ps; timeprecision 1ps;
  localparam int DEPTH = 32;

  logic rd_clk = 1'b0, hold = 1'b0, rst_n = 1'b1;
  logic [7:0][4:0] frames [DEPTH];
  logic [4:0] out;
  logic [7:0] addr;
  int checks = 0, failures = 0;

  readout dut (.rd_clk(rd_clk), .rst_n(rst_n), .hold(hold), .frames(frames), .out(out), .rd_addr(addr));

  function automatic logic [4:0] pat(int f, int l);
    return 5'((f * 7 + l * 3 + f / 4) ^ (l << 2));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick;
    #400 rd_clk = 1'b1;
    #400 rd_clk = 1'b0;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < DEPTH; f++)
      for (int l = 0; l < 8; l++) frames[f][l] = pat(f, l);
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    repeat (5) tick();
    check(addr == 0, "counter moved while hold low");
    hold = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < DEPTH * 8; n++) begin
        #10;
        check(addr == 8'(n), $sformatf("address %0d, expected %0d", addr, n));
        check(out == pat(DEPTH - 1 - n / 8, n % 8),
              $sformatf("read %0d: %0d expected %0d", n, out, pat(DEPTH - 1 - n / 8, n % 8)));
        tick();
      end
    end
    repeat (7) tick();
    check(addr == 7, "counter after 7 extra reads");
    hold = 1'b0;
    repeat (3) tick();
    check(addr == 7, "counter moved with hold low");
    rst_n = 1'b0;
    #1 check(addr == 0, "rst_n does not clear the counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
