// readout: binary-counter readout of the frozen capture memory.
//
// While hold is high the stored samples are read out through the 5-bit
// output port (OUT1..OUT5) by an externally applied read clock: a binary
// counter advances by one on each rising edge of rd_clk and selects the next
// sample. Samples come out in time order, oldest first: the oldest frame
// (stage DEPTH-1) ADC1..ADC8, then the next frame, and so on, so that sample
// i lies i*T/8 after the first one. The counter only advances while hold is
// high (the read clock is meant to run only then), is cleared by rst_n, the
// same reset that re-arms the trigger, and after the last sample wraps to the
// first. The published design gives the read clock, the binary counter and
// the in-order output; the ordering, the reset and the wrap are our
// choices. The readout
// is combinational from the counter, so out is valid shortly after each
// rd_clk edge and sample 0 is present as soon as hold rises.
//
// Interface: rd_clk, rst_n (async, active low), hold, frames[DEPTH] from the
// shift register;
// out (OUT1..OUT5 = out[0]..out[4]), rd_addr (current sample number).
module readout #(
  parameter int unsigned DEPTH    = omc_pkg::DEPTH,
  parameter int unsigned NUM_PH   = omc_pkg::NUM_PH,
  parameter int unsigned ADC_BITS = omc_pkg::ADC_BITS,
  localparam int unsigned NSAMP   = DEPTH * NUM_PH,
  localparam int unsigned AW      = $clog2(NSAMP)
) (
  input  logic                               rd_clk,
  input  logic                               rst_n,
  input  logic                               hold,
  input  logic [NUM_PH-1:0][ADC_BITS-1:0]    frames [DEPTH],
  output logic [ADC_BITS-1:0]                out,
  output logic [AW-1:0]                      rd_addr
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n)                       rd_addr <= '0;
    else if (!hold)                   rd_addr <= rd_addr;
    else if (rd_addr == AW'(NSAMP-1)) rd_addr <= '0;
    else                              rd_addr <= rd_addr + 1'b1;
  end

  always_comb begin
    int unsigned age;
    age = int'(rd_addr) / NUM_PH;
    out = frames[DEPTH - 1 - age][int'(rd_addr) % NUM_PH];
  end
endmodule
