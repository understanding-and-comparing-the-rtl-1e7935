`timescale 1ps/1ps
// tdc_sampler: the TDC's N_TAPS (256) sampling flip-flops and its output.
// At each rising clock edge every tap of the carry chain is captured into
// `sample`; the taps the launched edge has reached read 1. The Hamming
// weight of the capture is the TDC output: it tells how far along the chain
// the edge travelled in one clock period and falls when a lower supply
// slows the logic.
//
// Ports: clk, rst_n, taps (asynchronous tap inputs), sample, hw.
// Timing: sample holds the taps of the last edge; hw is registered one
// cycle later (the one-cycle latency for the 256-input count is this
// design's choice).
module tdc_sampler #(
  parameter int unsigned N_TAPS = 256,
  localparam int unsigned HW_W  = $clog2(N_TAPS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TAPS-1:0] taps,
  output logic [N_TAPS-1:0] sample,
  output logic [HW_W-1:0]   hw
);

  logic [HW_W-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < N_TAPS; i++) ones = ones + HW_W'(sample[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample <= '0;
      hw     <= '0;
    end else begin
      sample <= taps;
      hw     <= ones;
    end
  end

endmodule
