`timescale 1ps/1ps
// tb_tdc_sensor: the full 256-tap TDC at a 50 MHz clock with the coarse 4 /
// fine 9 calibration. For several supply slowdowns the expected Hamming
// weight is worked out from the element delays (coarse 16 ns, fine 0.9 ns,
// 24 ps per tap, all stretched by the slowdown): the taps reached within
// one 20 ns period. The captured sample must be a thermometer code of that
// length, the weight must match it, valid must follow the enable with the
// documented two-cycle latency, and a slowdown beyond the range (19%) must
// give 0.
module tb_tdc_sensor;
  localparam int unsigned PERIOD = 20_000;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [3:0] coarse_sel = 4'd4, fine_sel = 4'd9;
  logic [255:0] sample;
  logic [8:0]   hw;
  logic         valid;

  tdc_sensor #(.N_CARRY4(64)) dut (.clk, .rst_n, .enable, .coarse_sel, .fine_sel, .sample, .hw, .valid);

  always #(PERIOD/2) clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // taps the edge reaches strictly before the next sampling edge
  function automatic int expected_hw(input int unsigned coarse, input int unsigned fine);
    int unsigned d, tap, n;
    d   = pdn_sim_pkg::stretch(12000 + 1000 * coarse) + pdn_sim_pkg::stretch(100 * fine);
    tap = pdn_sim_pkg::stretch(24);
    if (d >= PERIOD) return 0;
    n = (PERIOD - d + tap - 1) / tap - 1;
    return (n > 256) ? 256 : int'(n);
  endfunction

  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned slows [6] = '{0, 10_000, 50_000, 100_000, 150_000, 190_000};
    int e;
    pdn_sim_pkg::slowdown_ppm = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(valid == 1'b0, "not valid while disabled");
    @(posedge clk) #1000 enable = 1'b1;    // gate opens at the next falling edge
    // launch at the next rising edge, capture one later, weight one later
    @(posedge clk); #1; check(valid == 1'b0, "not valid at launch");
    @(posedge clk); #1; check(valid == 1'b0, "not valid at capture");
    @(posedge clk); #1; check(valid == 1'b1, "valid two edges after the first launch");

    foreach (slows[s]) begin
      pdn_sim_pkg::slowdown_ppm = slows[s];
      repeat (4) @(posedge clk);
      e = expected_hw(4, 9);
      for (int n = 0; n < 5; n++) begin
        @(posedge clk); #1;
        check(int'(hw) == e, $sformatf("slowdown %0d ppm: hw %0d expected %0d", slows[s], hw, e));
        check(sample == ((e == 0) ? 256'd0 : ({256{1'b1}} >> (256 - e))), "sample is a thermometer code");
        check(valid == 1'b1, "valid while enabled");
      end
    end
    check(expected_hw(4, 9) == 0, "19% slowdown is outside the calibrated range");

    // a larger initial delay reaches fewer taps
    pdn_sim_pkg::slowdown_ppm = 0;
    fine_sel = 4'd15;
    repeat (4) @(posedge clk); #1;
    check(int'(hw) == expected_hw(4, 15), $sformatf("fine 15: hw %0d expected %0d", hw, expected_hw(4, 15)));
    check(expected_hw(4, 15) < expected_hw(4, 9), "more delay, fewer taps");

    enable = 1'b0;
    repeat (4) @(posedge clk); #1;
    check(valid == 1'b0, "valid drops after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
