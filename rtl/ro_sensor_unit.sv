`timescale 1ps/1ps
// ro_sensor_unit: one ring-oscillator voltage sensor. An enabled ring
// oscillator clocks a counter; at every rising edge of `clk` the number of
// oscillator rising edges seen since the previous `clk` edge is presented on
// `count`. A lower supply slows the ring and lowers the count.
//
// How: the circuit as published clears its counter after each capture. This
// design instead lets the CNT_W-bit counter run freely in the oscillator
// domain, captures it at every `clk` edge and outputs the difference of the
// last two captures (modulo 2^CNT_W). That is the same per-period count
// with no clear signal crossing into the fast oscillator domain. The count
// per period must stay below 2^CNT_W.
//
// Ports: clk, rst_n (synchronous, clears the captures), enable (starts the
// ring), count (oscillations during the last clk period; 0 until two clk
// edges have passed after reset, since the counter itself has no reset).
// Timing: count is valid right after each clk edge and covers the period
// that ended at that edge.
module ro_sensor_unit #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic [CNT_W-1:0] count
);

  logic             osc;
  logic [CNT_W-1:0] ro_cnt;
  logic [CNT_W-1:0] snap, snap_prev;
  logic [1:0]       primed;

  ring_osc u_ro (
    .enable (enable),
    .osc    (osc)
  );

  // free-running counter in the oscillator domain; only differences are used
  always_ff @(posedge osc) ro_cnt <= ro_cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      snap      <= '0;
      snap_prev <= '0;
      primed    <= '0;
    end else begin
      snap      <= ro_cnt;
      snap_prev <= snap;
      primed    <= {primed[0], 1'b1};
    end
  end

  // both captures hold counter values once two edges have passed since reset
  assign count = primed[1] ? snap - snap_prev : '0;

endmodule
