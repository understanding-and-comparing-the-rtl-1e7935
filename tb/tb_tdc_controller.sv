`timescale 1ps/1ps
// tb_tdc_controller: launch must copy the clock (a rising edge at every
// rising clock edge) exactly while the gate is open, the gate must only
// change on falling clock edges, and launch must never show a glitch: no
// rising launch edge without a rising clock edge at the same time.
module tb_tdc_controller;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic launch, en_gate;
  int launches = 0, clk_edges_en = 0;

  tdc_controller dut (.clk, .rst_n, .enable, .launch, .en_gate);

  always #10_000 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge launch) begin
    launches++;
    #0 check(clk == 1'b1, "launch rises only with the clock");
  end
  always @(en_gate) check(clk == 1'b0, "gate changes while the clock is low");

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(posedge clk) #1000 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(launches == 0, "no launch while disabled");
    for (int n = 0; n < 100; n++) begin
      // change enable at an arbitrary point of the cycle
      #($urandom_range(1, 19_000));
      enable = 1'($urandom_range(0, 1));
      @(posedge clk);
      #1;
      check(launch == en_gate, "launch follows the clock while the gate is open");
    end
    // count launches over 20 enabled cycles
    @(posedge clk) enable = 1'b1;
    @(negedge clk);
    launches = 0;
    repeat (20) @(posedge clk);
    #1;
    check(launches == 20, $sformatf("one launch per clock edge (%0d)", launches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
