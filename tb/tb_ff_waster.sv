`timescale 1ps/1ps
// tb_ff_waster: checks the FF waster at its full fanout of 7,000 loads. A
// 0->1 step on enable must reach the source flip-flop after one clock edge
// and every load after two; a 1->0 step returns them all; every load always
// equals the source of the previous cycle.
module tb_ff_waster;
  localparam int unsigned FANOUT = 7000;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic enable = 1'b0;
  logic src_q;
  logic [FANOUT-1:0] load_q;
  int ones_cycles = 0;

  ff_waster #(.FANOUT(FANOUT)) dut (.clk, .enable, .src_q, .load_q);

  always #10_000 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_src;
    repeat (3) @(posedge clk);
    check(src_q == 1'b0 && load_q == '0, "at rest after enable held low");
    @(negedge clk) enable = 1'b1;
    @(posedge clk); #1;
    check(src_q == 1'b1, "source switches one edge after enable");
    check(load_q == '0, "loads not yet switched");
    @(posedge clk); #1;
    check(load_q == {FANOUT{1'b1}}, "all loads switch on the second edge");
    // random enable pattern: loads always follow the source one cycle later
    for (int n = 0; n < 50; n++) begin
      @(negedge clk) enable = 1'($urandom_range(0, 1));
      prev_src = src_q;
      @(posedge clk); #1;
      check(load_q == {FANOUT{prev_src}}, "loads equal the previous source value");
      check(src_q == enable, "source equals enable of the previous cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
