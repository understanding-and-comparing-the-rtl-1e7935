`timescale 1ps/1ps
// pdn_sim_pkg: shared state for the behavioural delay models (ring
// oscillators, TDC delay elements and carry chain). A drop of the on-chip
// supply makes every logic delay longer; simulation represents that drop as
// one fractional slowdown, in parts per million, that a testbench sets and
// that every modelled delay is stretched by. It has no effect on synthesis.
package pdn_sim_pkg;

  int unsigned slowdown_ppm = 0;

  // nominal delay (ps) stretched by the current slowdown
  function automatic int unsigned stretch(input int unsigned nominal_ps);
    longint unsigned d;
    d = longint'(nominal_ps) * (64'd1_000_000 + longint'(slowdown_ppm)) / 64'd1_000_000;
    return int'(d);
  endfunction

endpackage
