`timescale 1ps/1ps
// tb_ro_sensor: the 16-unit RO sensor at 10 MHz. The sum must equal the sum
// of the unit counts of the previous cycle (checked against the units'
// outputs), lie near 16 x 35.6 at nominal supply, drop by about the
// slowdown when the supply is slowed, and valid must rise three edges after
// enable.
module tb_ro_sensor;
  localparam int unsigned PERIOD = 100_000;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [19:0] sum;
  logic valid;
  int expect_sum = 0;

  ro_sensor #(.N_UNITS(16), .CNT_W(16)) dut (.clk, .rst_n, .enable, .sum, .valid);

  always #(PERIOD/2) clk = ~clk;

  // sum the unit outputs independently, one cycle ahead of the register
  always @(posedge clk) begin
    int s;
    s = 0;
    for (int i = 0; i < 16; i++) s += int'(dut.count[i]);
    expect_sum <= s;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pdn_sim_pkg::slowdown_ppm = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(valid == 1'b0 && sum == 0, "idle sensor: sum 0, not valid");
    enable = 1'b1;
    @(negedge clk); check(valid == 1'b0, "not valid one edge after enable");
    @(negedge clk); check(valid == 1'b0, "not valid two edges after enable");
    @(negedge clk); check(valid == 1'b1, "valid three edges after enable");
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      check(int'(sum) == expect_sum, $sformatf("sum %0d equals unit total %0d", sum, expect_sum));
      check(sum >= 16*35 && sum <= 16*36, $sformatf("nominal sum %0d", sum));
    end
    pdn_sim_pkg::slowdown_ppm = 100_000;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      check(int'(sum) == expect_sum, $sformatf("slowed sum %0d equals unit total %0d", sum, expect_sum));
      // 35.6 / 1.1 = 32.4 counts per unit
      check(sum >= 16*32 && sum <= 16*33, $sformatf("slowed sum %0d", sum));
    end
    enable = 1'b0;
    @(negedge clk); @(negedge clk);
    check(valid == 1'b0, "valid drops after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
