`timescale 1ps/1ps
// tdc_adj_delay: behavioural model (not synthesizable logic) of one of the
// TDC's two adjustable delay elements. It passes `din` to `dout` after
// BASE_PS + sel * STEP_PS picoseconds, stretched by the supply slowdown in
// pdn_sim_pkg. The TDC uses one instance with a coarse step and one with a
// fine step; together they are calibrated so the launched edge stops part
// way along the carry chain at the sampling clock edge. On the FPGA the
// element is a chain of LUT/route delays picked by a multiplexer; the step
// sizes and the width of `sel` are this design's choice.
//
// Ports: sel (setting), din (edge in), dout (delayed edge).
module tdc_adj_delay #(
  parameter int unsigned SEL_W   = 4,
  parameter int unsigned BASE_PS = 0,
  parameter int unsigned STEP_PS = 1000
) (
  input  logic [SEL_W-1:0] sel,
  input  logic             din,
  output logic             dout
);

  initial dout = 1'b0;

  always @(din) begin
    fork
      automatic logic v = din;
      automatic int unsigned d = pdn_sim_pkg::stretch(BASE_PS + int'(sel) * STEP_PS);
      begin #(d) dout = v; end
    join_none
  end

endmodule
