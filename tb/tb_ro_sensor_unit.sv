`timescale 1ps/1ps
// tb_ro_sensor_unit: runs one RO sensor with a 10 MHz clock. The testbench
// counts the oscillator's rising edges itself between clock edges and
// requires the unit's count to match exactly, cycle by cycle; it also
// checks the nominal count (~35.6 per 100 ns), that a 20% slowdown lowers
// it, and that a disabled ring reports 0.
module tb_ro_sensor_unit;
  localparam int unsigned PERIOD = 100_000;   // 10 MHz
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [15:0] count;
  int ref_edges = 0, ref_last = 0;

  ro_sensor_unit #(.CNT_W(16)) dut (.clk, .rst_n, .enable, .count);

  always #(PERIOD/2) clk = ~clk;
  always @(posedge dut.osc) ref_edges++;
  // edges seen in the period that ended at this clock edge
  always @(posedge clk) begin
    ref_last  <= ref_edges;
    ref_edges <= 0;
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
    repeat (3) @(negedge clk);
    check(count == 0, "disabled ring counts 0");
    enable = 1'b1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      check(int'(count) == ref_last, $sformatf("count %0d equals edges %0d", count, ref_last));
      check(count >= 35 && count <= 36, $sformatf("nominal count %0d in 35..36", count));
    end
    pdn_sim_pkg::slowdown_ppm = 200_000;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      check(int'(count) == ref_last, $sformatf("slowed count %0d equals edges %0d", count, ref_last));
      check(count >= 29 && count <= 30, $sformatf("slowed count %0d in 29..30", count));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
