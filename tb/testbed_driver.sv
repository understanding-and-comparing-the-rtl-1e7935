`timescale 1ps/1ps
// testbed_driver: the end-to-end experiment on the testbed, written once and
// used by both the reduced-size and the full-size testbench. It plays the
// JTAG-to-AXI master (clock, reset and AXI4-Lite transfers) and stands in
// for the supply.
//
// Supply stand-in: every enabled RO waster adds 225,000 / N_RO ppm of
// slowdown to all modelled delays (so 80% of the rings push the calibrated
// TDC out of range, as 800 of 1,000 do in the measurements), and each 0->1
// switch of the FF waster's source adds 21,000 / FANOUT ppm per load
// (2.1% in all) for one clock period, starting 1 ns after the edge.
//
// Experiments, following the measurement flow:
//  - TDC trials at 50 MHz sweeping 0..N_RO RO wasters fired at trial cycle
//    20: the logged Hamming weight after the trigger must equal the value
//    worked out from the delays, fall as more rings run, and reach 0;
//  - RO sensor trials at 10 MHz fired at cycle 10: the slowdown read from
//    the RO sensor must agree with the one applied;
//  - FF waster trials: the short droop must show in the TDC trace and stay
//    within one count per ring in the RO trace;
//  - immediate (untriggered) firing, FIFO overflow, a calibration change,
//    and register traffic to both slaves through the interconnect.
// Each mechanism is counted, and one that never happened is a failure.
module testbed_driver
  import axil_pkg::*;
  import testbed_pkg::*;
#(
  parameter int unsigned N_RO   = 1000,
  parameter int unsigned FANOUT = 7000,
  parameter int unsigned DEPTH  = 1024
) (
  output logic        clk,
  output logic        rst_n,
  output axil_req_t   req,
  input  axil_rsp_t   rsp,
  input  logic        trial_busy,
  input  logic        waster_trigger,
  input  logic        ff_waster_on,
  input  logic [15:0] ro_wasters_on,
  input  logic        ff_src           // FF waster source flip-flop (probe)
);
  // slowdown per ring and per load, scaled so that N_RO rings and FANOUT
  // loads give the same droop at any size
  localparam int unsigned PPM_PER_RING = 225_000 / N_RO;
  localparam int unsigned PPM_PER_LOAD = 21_000 / FANOUT;
  localparam logic [31:0] W = WASTER_BASE, S = SENSOR_BASE;
  int checks = 0, failures = 0;
  int half_period = 10_000;
  int unsigned ff_pulse_ppm = 0;

  // mechanism counters
  int n_ro_fire = 0, n_ff_fire = 0, n_tdc_trial = 0, n_ro_trial = 0, n_tdc_saturated = 0;
  int n_ff_seen_tdc = 0, n_overflow = 0, n_immediate = 0, n_calibration = 0, n_both_slaves = 0;

  initial begin
    clk   = 1'b0;
    rst_n = 1'b0;
    forever #(half_period) clk = ~clk;
  end

  // ---------------- supply stand-in ----------------
  // the FF burst droops the supply from 1 ns after the source switches,
  // for one clock period
  always @(posedge ff_src) begin
    #1_000 ff_pulse_ppm = FANOUT * PPM_PER_LOAD;
    #(2 * half_period) ff_pulse_ppm = 0;
  end
  always @* pdn_sim_pkg::slowdown_ppm = int'(ro_wasters_on) * PPM_PER_RING + ff_pulse_ppm;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- master BFM (call at a falling clock edge) ----------------
  task automatic axi_write(input logic [31:0] addr, input logic [31:0] data);
    bit aw_ok = 0, w_ok = 0;
    req.awaddr = addr; req.awvalid = 1; req.wdata = data; req.wstrb = 4'hF; req.wvalid = 1;
    while (!(aw_ok && w_ok)) begin
      #1;
      if (req.awvalid && rsp.awready) aw_ok = 1;
      if (req.wvalid && rsp.wready) w_ok = 1;
      @(negedge clk);
      if (aw_ok) req.awvalid = 0;
      if (w_ok) req.wvalid = 0;
    end
    req.bready = 1;
    #1;
    while (!rsp.bvalid) begin @(negedge clk); #1; end
    @(negedge clk); req.bready = 0;
  endtask

  task automatic axi_read(input logic [31:0] addr, output logic [31:0] data);
    req.araddr = addr; req.arvalid = 1;
    #1;
    while (!rsp.arready) begin @(negedge clk); #1; end
    @(negedge clk); req.arvalid = 0; req.rready = 1;
    #1;
    while (!rsp.rvalid) begin @(negedge clk); #1; end
    data = rsp.rdata;
    @(negedge clk); req.rready = 0;
  endtask
  initial begin : watchdog
    #1;
    repeat (60_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_hw(input int unsigned slow_ppm, input int unsigned coarse, input int unsigned fine);
    int unsigned d, tap, n;
    longint unsigned k;
    k   = 1_000_000 + slow_ppm;
    d   = int'(longint'(12000 + 1000 * coarse) * k / 1_000_000) + int'(longint'(100 * fine) * k / 1_000_000);
    tap = int'(24 * k / 1_000_000);
    if (d >= 20_000) return 0;
    n = (20_000 - d + tap - 1) / tap - 1;
    return (n > 256) ? 256 : int'(n);
  endfunction

  // RO sum over 16 rings in one 100 ns period: 100 ns / (8 stretched stages)
  function automatic real expected_ro_sum(input int unsigned slow_ppm);
    return 16.0 * 100_000.0 / (8.0 * real'(351 * (1_000_000 + slow_ppm) / 1_000_000));
  endfunction

  task automatic run_trial(input int samples, input int trig, output logic [31:0] words [$]);
    logic [31:0] st, d;
    axi_write(S | SEN_SAMPLES, samples);
    axi_write(S | SEN_TRIG, trig);
    axi_read(S | SEN_CTRL, d);
    axi_write(S | SEN_CTRL, d | 32'd1);
    do axi_read(S | SEN_STATUS, st); while (st[0]);
    words.delete();
    for (int n = 0; n < int'(st[31:16]); n++) begin
      axi_read(S | SEN_DATA, d);
      words.push_back(d);
    end
  endtask

  initial begin
    logic [31:0] d, st;
    logic [31:0] words [$];
    int counts [6];
    int prev_hw, e, base_hw, min_hw;
    real nominal_sum, s_meas, s_appl, avg;
    foreach (counts[c]) counts[c] = int'(N_RO) * c / 5;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---------------- both slaves answer through the interconnect ----------------
    axi_read(W | WST_INFO, d);
    check(d == {16'(N_RO), 16'(FANOUT)}, $sformatf("waster INFO %h", d));
    axi_read(S | SEN_TDC_DELAY, d);
    check(d == 32'h94, "sensor TDC delay at reset");
    if (d == 32'h94) n_both_slaves++;

    // ---------------- immediate firing ----------------
    axi_write(W | WST_RO_COUNT, N_RO / 10);
    axi_write(W | WST_CTRL, 32'b010);
    @(negedge clk);
    check(ro_wasters_on == 16'(N_RO / 10) && !trial_busy, "rings fire at once in immediate mode");
    if (ro_wasters_on == 16'(N_RO / 10)) n_immediate++;
    axi_write(W | WST_CTRL, 32'b000);
    @(negedge clk);
    check(ro_wasters_on == 0, "rings stop when disarmed");

    // ---------------- TDC trials, RO waster sweep ----------------
    axi_write(S | SEN_CTRL, 32'b1010);             // TDC on and selected
    axi_write(W | WST_CTRL, 32'b110);              // RO wasters armed, triggered
    prev_hw = 1000;
    foreach (counts[c]) begin
      axi_write(W | WST_RO_COUNT, counts[c]);
      run_trial(40, 20, words);
      n_tdc_trial++;
      if (counts[c] > 0) n_ro_fire++;
      check(words.size() == 40, "40 TDC words");
      base_hw = expected_hw(0, 4, 9);
      e       = expected_hw(counts[c] * PPM_PER_RING, 4, 9);
      for (int n = 2; n < 20; n++)
        check(int'(words[n][19:0]) == base_hw, $sformatf("%0d rings, word %0d before trigger: %0d expected %0d", counts[c], n, words[n][19:0], base_hw));
      for (int n = 25; n < 40; n++)
        check(int'(words[n][19:0]) == e, $sformatf("%0d rings, word %0d after trigger: %0d expected %0d", counts[c], n, words[n][19:0], e));
      check(e <= prev_hw, "more rings, lower weight");
      if (words[39][19:0] == 0) n_tdc_saturated++;
      prev_hw = e;
      $display("TDC: %0d RO wasters -> Hamming weight %0d (nominal %0d)", counts[c], words[39][19:0], base_hw);
    end
    check(expected_hw(N_RO * PPM_PER_RING, 4, 9) == 0, "all rings saturate the TDC");

    // ---------------- TDC with the FF waster ----------------
    axi_write(W | WST_RO_COUNT, 0);
    axi_write(W | WST_CTRL, 32'b101);              // FF waster armed, triggered
    run_trial(40, 20, words);
    n_tdc_trial++; n_ff_fire++;
    min_hw = 1000;
    for (int n = 2; n < 40; n++) if (int'(words[n][19:0]) < min_hw) min_hw = int'(words[n][19:0]);
    base_hw = expected_hw(0, 4, 9);
    check(min_hw < base_hw - 5, $sformatf("FF waster dip seen by the TDC (min %0d, nominal %0d)", min_hw, base_hw));
    if (min_hw < base_hw - 5) n_ff_seen_tdc++;
    check(words[39][19:0] == base_hw, "TDC back at nominal after the FF burst");
    $display("TDC: FF waster burst -> minimum Hamming weight %0d (nominal %0d)", min_hw, base_hw);

    // ---------------- calibration change ----------------
    axi_write(S | SEN_TDC_DELAY, 32'h04);          // coarse 4, fine 0
    axi_write(W | WST_CTRL, 32'b000);
    run_trial(10, 1000, words);
    check(int'(words[9][19:0]) == expected_hw(0, 4, 0), $sformatf("recalibrated weight %0d expected %0d", words[9][19:0], expected_hw(0, 4, 0)));
    if (int'(words[9][19:0]) == expected_hw(0, 4, 0)) n_calibration++;
    axi_write(S | SEN_TDC_DELAY, 32'h94);

    // ---------------- FIFO overflow ----------------
    run_trial(DEPTH + 10, 100_000, words);
    axi_read(S | SEN_STATUS, st);
    check(words.size() == DEPTH, "FIFO holds DEPTH words");
    if (st[3]) n_overflow++;
    check(st[3] == 1'b1, "overflow flagged");

    // ---------------- RO sensor trials at 10 MHz ----------------
    half_period = 50_000;
    axi_write(S | SEN_CTRL, 32'b0100);             // RO sensor on and selected
    axi_write(W | WST_CTRL, 32'b110);
    nominal_sum = expected_ro_sum(0);
    for (int c = 0; c < 3; c++) begin
      axi_write(W | WST_RO_COUNT, c * int'(N_RO) / 2);
      run_trial(30, 10, words);
      n_ro_trial++;
      avg = 0;
      for (int n = 14; n < 30; n++) avg += real'(words[n][19:0]) / 16.0;
      s_meas = nominal_sum / avg - 1.0;
      s_appl = real'(c * int'(N_RO) / 2 * int'(PPM_PER_RING)) / 1.0e6;
      for (int n = 2; n < 10; n++)
        check(real'(words[n][19:0]) > nominal_sum - 16.5 && real'(words[n][19:0]) < nominal_sum + 16.5, "RO sum nominal before trigger");
      check(s_meas > s_appl - 0.01 && s_meas < s_appl + 0.01,
            $sformatf("%0d rings: RO sensor slowdown %f, applied %f", c * int'(N_RO) / 2, s_meas, s_appl));
      $display("RO: %0d RO wasters -> mean sum %f, slowdown %f (applied %f)", c * int'(N_RO) / 2, avg, s_meas, s_appl);
    end

    // ---------------- RO sensor with the FF waster ----------------
    axi_write(W | WST_RO_COUNT, 0);
    axi_write(W | WST_CTRL, 32'b101);
    run_trial(30, 10, words);
    n_ro_trial++; n_ff_fire++;
    for (int n = 2; n < 30; n++)
      check(real'(words[n][19:0]) > nominal_sum - 16.5 && real'(words[n][19:0]) < nominal_sum + 16.5,
            $sformatf("short FF droop hardly moves the RO sum (word %0d = %0d)", n, words[n][19:0]));
    axi_write(W | WST_CTRL, 32'b000);

    // ---------------- every mechanism happened ----------------
    check(n_both_slaves > 0, "interconnect reached both slaves");
    check(n_immediate > 0, "immediate firing happened");
    check(n_ro_fire > 0, "RO wasters fired by the trigger");
    check(n_ff_fire > 0, "FF waster fired by the trigger");
    check(n_tdc_trial > 0, "TDC trials ran");
    check(n_ro_trial > 0, "RO sensor trials ran");
    check(n_tdc_saturated > 0, "TDC saturation happened");
    check(n_ff_seen_tdc > 0, "FF burst seen by the TDC");
    check(n_calibration > 0, "calibration change took effect");
    check(n_overflow > 0, "FIFO overflow happened");
    $display("mechanisms: slaves=%0d immediate=%0d ro_fire=%0d ff_fire=%0d tdc_trials=%0d ro_trials=%0d saturated=%0d ff_seen=%0d calib=%0d overflow=%0d",
             n_both_slaves, n_immediate, n_ro_fire, n_ff_fire, n_tdc_trial, n_ro_trial, n_tdc_saturated, n_ff_seen_tdc, n_calibration, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
