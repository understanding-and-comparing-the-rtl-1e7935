`timescale 1ps/1ps
// tb_ring_osc: checks the ring-oscillator model. Disabled, the ring must
// rest; enabled, it must run at 1 / (8 x STAGE_PS) (356 MHz for 351 ps);
// with a 10% supply slowdown every stage is 10% slower. Expected edge
// counts are worked out from the stage delay, not read from the model.
module tb_ring_osc;
  int checks = 0, failures = 0;
  logic enable = 1'b0;
  logic osc;
  int   edges = 0;

  ring_osc #(.STAGE_PS(351)) dut (.enable(enable), .osc(osc));

  always @(posedge osc) edges++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected rising edges in `window` ps for a period of 8 stages
  function automatic int expect_edges(input int unsigned stage_ps, input int unsigned window);
    return int'(window / (8 * stage_ps));
  endfunction

  initial begin : watchdog
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    pdn_sim_pkg::slowdown_ppm = 0;
    #20_000;
    check(osc == 1'b1, "disabled ring rests with osc high");
    edges = 0; #100_000;
    check(edges == 0, "no oscillation while disabled");

    enable = 1'b1;
    #10_000;                       // let it start
    edges = 0; #1_000_000;
    e = expect_edges(351, 1_000_000);
    check(edges >= e - 1 && edges <= e + 1, $sformatf("nominal edges %0d expected %0d", edges, e));

    pdn_sim_pkg::slowdown_ppm = 100_000;
    #10_000;
    edges = 0; #1_000_000;
    e = expect_edges(pdn_sim_pkg::stretch(351), 1_000_000);
    check(edges >= e - 1 && edges <= e + 1, $sformatf("slowed edges %0d expected %0d", edges, e));
    check(pdn_sim_pkg::stretch(351) == 386, "stretch of 351 ps by 10%");

    enable = 1'b0;
    #20_000;
    edges = 0; #100_000;
    check(edges == 0 && osc == 1'b1, "ring stops when disabled again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
