`timescale 1ps/1ps
// tdc_controller: makes the edge that the TDC launches into its delay line.
// While `enable` is high, `launch` is the clock itself, so a rising edge
// enters the delay line at every rising edge of `clk` and is sampled by the
// tap flip-flops at the next rising edge. The enable is taken on the falling
// clock edge (a glitch-free clock gate, as in an integrated clock-gating
// cell), so `launch` only ever starts or stops while `clk` is low. How the
// edge is produced is this design's choice. The delay before the carry
// chain must be longer than half a clock period, so that the falling edge of
// `launch` has not reached the first tap when the taps are sampled.
//
// Ports: clk, rst_n (synchronous, taken on the falling edge), enable,
// launch. en_gate is the gate state, high when the next rising clock edge
// will be launched.
module tdc_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic launch,
  output logic en_gate
);

  always_ff @(negedge clk) begin
    if (!rst_n) en_gate <= 1'b0;
    else        en_gate <= enable;
  end

  assign launch = clk & en_gate;

endmodule
