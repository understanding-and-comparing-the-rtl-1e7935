`timescale 1ps/1ps
// tb_tdc_carry_chain: sends one rising edge into the 64-CARRY4 chain and
// checks, for every one of the 256 taps, that it rises exactly (i+1) x 24 ps
// after the input, then that a falling edge clears the chain the same way.
module tb_tdc_carry_chain;
  localparam int unsigned N_TAPS = 256;
  int checks = 0, failures = 0;
  logic cin = 1'b0;
  logic [N_TAPS-1:0] taps;
  time  t_rise [N_TAPS];
  time  t_fall [N_TAPS];
  time  t0, t1;

  tdc_carry_chain #(.N_CARRY4(64), .TAP_PS(24)) dut (.cin, .taps);

  for (genvar i = 0; i < N_TAPS; i++) begin : g_mon
    always @(posedge taps[i]) t_rise[i] = $time;
    always @(negedge taps[i]) t_fall[i] = $time;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pdn_sim_pkg::slowdown_ppm = 0;
    #10_000;
    check(taps == '0, "chain at rest");
    t0 = $time; cin = 1'b1;
    #(24 * 100 + 12);
    check(taps == {{(N_TAPS-100){1'b0}}, {100{1'b1}}}, "after 100.5 tap delays exactly 100 taps are high");
    #20_000;
    check(taps == '1, "all taps high after the edge passed");
    t1 = $time; cin = 1'b0;
    #20_000;
    check(taps == '0, "all taps low after the falling edge");
    for (int i = 0; i < N_TAPS; i++) begin
      check(t_rise[i] - t0 == time'(24 * (i + 1)), $sformatf("tap %0d rise at %0t", i, t_rise[i] - t0));
      check(t_fall[i] - t1 == time'(24 * (i + 1)), $sformatf("tap %0d fall at %0t", i, t_fall[i] - t1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
