// shift_register: capture memory of the noise monitor.
//
// On every rising edge of DFF_CLK the aligned frame of eight 5-bit samples is
// written into stage 0 and every stage moves one place further, so the
// register always holds the most recent DEPTH frames (stage 0 the newest,
// stage DEPTH-1 the oldest). When the hold signal stops DFF_CLK nothing
// moves and the stored waveform stays put for readout. The published design
// gives this behaviour; the depth of 32 frames (256 samples) follows from its
// 100 ns capture time at a 320 MHz clock. The asynchronous clear is our
// addition so that a readout before the register has filled returns zeros.
//
// Interface: clk (DFF_CLK), rst_n (async, active low), d (frame);
// q[i] = frame stored i DFF_CLK edges ago (i = 0 newest).
module shift_register #(
  parameter int unsigned DEPTH    = omc_pkg::DEPTH,
  parameter int unsigned NUM_PH   = omc_pkg::NUM_PH,
  parameter int unsigned ADC_BITS = omc_pkg::ADC_BITS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NUM_PH-1:0][ADC_BITS-1:0]    d,
  output logic [NUM_PH-1:0][ADC_BITS-1:0]    q [DEPTH]
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      q[0] <= d;
      for (int i = 1; i < DEPTH; i++) q[i] <= q[i-1];
    end
  end
endmodule
