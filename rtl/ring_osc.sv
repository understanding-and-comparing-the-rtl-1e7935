`timescale 1ps/1ps
// ring_osc: behavioural model (not synthesizable logic) of the enabled ring
// oscillator used both as an RO power waster and inside each RO sensor.
//
// Structure, as in the circuit: a 2:1 multiplexer whose select is `enable`,
// input 0 tied to ground and input 1 fed back from the last of three
// inverters. With enable low the mux output is 0 and the ring rests
// (osc = 1); with enable high the three inversions make it oscillate with a
// period of 2 x 4 stage delays. On the FPGA each stage is a LUT kept from
// optimisation; here each stage is a transport delay of STAGE_PS stretched by
// the supply slowdown in pdn_sim_pkg (each change is scheduled with the
// value it had when it happened), so a lower supply lowers the
// frequency. STAGE_PS = 351 gives the 356 MHz nominal frequency reported for
// the sensor rings; the per-stage split is this model's choice.
//
// Ports: enable (in), osc (out, inverter 3).
module ring_osc #(
  parameter int unsigned STAGE_PS = 351
) (
  input  logic enable,
  output logic osc
);

  logic mux_o, inv1, inv2, inv3;

  // resting state of the ring with enable low; every stage also re-evaluates
  // when enable changes, so a ring that starts up in an inconsistent state
  // (simulation start-up order) still oscillates once enabled
  initial begin
    mux_o = 1'b0;
    inv1  = 1'b1;
    inv2  = 1'b0;
    inv3  = 1'b1;
  end

  always @(enable, inv3) begin
    fork
      automatic logic v = enable ? inv3 : 1'b0;
      automatic int unsigned d = pdn_sim_pkg::stretch(STAGE_PS);
      begin #(d) mux_o = v; end
    join_none
  end
  always @(mux_o, enable) begin
    fork
      automatic logic v = ~mux_o;
      automatic int unsigned d = pdn_sim_pkg::stretch(STAGE_PS);
      begin #(d) inv1 = v; end
    join_none
  end
  always @(inv1, enable) begin
    fork
      automatic logic v = ~inv1;
      automatic int unsigned d = pdn_sim_pkg::stretch(STAGE_PS);
      begin #(d) inv2 = v; end
    join_none
  end
  always @(inv2, enable) begin
    fork
      automatic logic v = ~inv2;
      automatic int unsigned d = pdn_sim_pkg::stretch(STAGE_PS);
      begin #(d) inv3 = v; end
    join_none
  end

  assign osc = inv3;

endmodule
