`timescale 1ps/1ps
// ff_waster: flip-flop power waster. A source flip-flop registers `enable`
// and its output drives the D inputs of FANOUT load flip-flops. When
// `enable` steps from 0 to 1, the source output rises on the next clock edge
// and charges the large capacitance of its fanout net, and on the edge after
// that all FANOUT loads switch together: a short, single-edge burst of
// current. FANOUT (0 to 7,000 in the measurements, 7,000 here) is fixed when
// the design is built. No reset is used, as in the circuit: hold `enable`
// low for two cycles to bring the waster to rest.
//
// Ports: clk, enable (step input), src_q (source output), load_q (load
// outputs, brought out so synthesis keeps the loads).
// Timing: src_q follows enable after 1 cycle, load_q after 2 cycles.
module ff_waster #(
  parameter int unsigned FANOUT = 7000
) (
  input  logic              clk,
  input  logic              enable,
  output logic              src_q,
  (* keep = "true" *)
  output logic [FANOUT-1:0] load_q
);

  always_ff @(posedge clk) src_q <= enable;

  always_ff @(posedge clk) load_q <= {FANOUT{src_q}};

endmodule
