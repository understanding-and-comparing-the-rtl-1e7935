`timescale 1ps/1ps
// tdc_carry_chain: behavioural model (not synthesizable logic) of the TDC's
// tapped line of N_CARRY4 CARRY4 carry primitives in series (4 taps each,
// 256 taps for 64 primitives). With every select input high, each CARRY4
// passes its carry input through four carry multiplexers; the output of each
// multiplexer is one tap. The model gives every tap a delay of TAP_PS after
// the previous one, stretched by the supply slowdown in pdn_sim_pkg, so a
// rising edge on `cin` sweeps up the taps one by one. TAP_PS = 24 makes one
// tap 0.12% of a 20 ns clock period, the TDC resolution reported at 50 MHz.
//
// Ports: cin (edge in), taps (tap i is the output of carry stage i).
module tdc_carry_chain #(
  parameter int unsigned N_CARRY4 = 64,
  parameter int unsigned TAP_PS   = 24
) (
  input  logic                  cin,
  output logic [4*N_CARRY4-1:0] taps
);

  localparam int unsigned N_TAPS = 4 * N_CARRY4;

  logic chain [N_TAPS];

  initial foreach (chain[i]) chain[i] = 1'b0;

  always @(cin) begin
    fork
      automatic logic v = cin;
      automatic int unsigned d = pdn_sim_pkg::stretch(TAP_PS);
      begin #(d) chain[0] = v; end
    join_none
  end

  for (genvar i = 1; i < N_TAPS; i++) begin : g_tap
    always @(chain[i-1]) begin
      fork
        automatic logic v = chain[i-1];
        automatic int unsigned d = pdn_sim_pkg::stretch(TAP_PS);
        begin #(d) chain[i] = v; end
      join_none
    end
  end

  always_comb
    for (int i = 0; i < N_TAPS; i++) taps[i] = chain[i];

endmodule
