`timescale 1ps/1ps
// ro_waster_bank: N_RO ring-oscillator power wasters. Each is a ring_osc
// (mux + three inverters) with its own enable bit, so the number of
// oscillating rings, and with it the continuous current drawn from the
// supply, can be set at run time from 0 to N_RO (1,000 here). The
// per-ring enable is this design's choice; the rings themselves follow
// the waster circuit.
//
// Ports: enable[i] starts ring i, osc[i] is its output.
module ro_waster_bank #(
  parameter int unsigned N_RO = 1000
) (
  input  logic [N_RO-1:0] enable,
  output logic [N_RO-1:0] osc
);

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ring_osc u_ro (
      .enable (enable[i]),
      .osc    (osc[i])
    );
  end

endmodule
