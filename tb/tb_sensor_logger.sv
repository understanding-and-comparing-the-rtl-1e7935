`timescale 1ps/1ps
// tb_sensor_logger: trials on the sensor slave with a 64-word FIFO. The
// testbench stands in for the supply: while the slave's trigger output is
// high it applies a 10% slowdown to every modelled delay, the way the
// wasters' droop would. Checks: reset values, that a trial lasts exactly
// SAMPLES cycles and fills the FIFO with SAMPLES words, that TDC words
// carry the expected Hamming weight before and after the trigger (worked
// out from the element delays), that RO words at 10 MHz carry ~16 x 35.6
// before and ~16 x 32.4 after, overflow when a trial outlasts the FIFO,
// reads of an empty FIFO, and that START with SAMPLES = 0 does nothing.
module tb_sensor_logger;
  import axil_pkg::*;
  import testbed_pkg::*;
  localparam int unsigned DEPTH = 64;
  localparam logic [31:0] S = SENSOR_BASE;
  int checks = 0, failures = 0;
  int half_period = 10_000;
  logic clk = 1'b0, rst_n = 1'b0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic trigger, busy;
  int busy_cycles = 0, trig_cycles = 0;

  sensor_logger #(.FIFO_DEPTH(DEPTH), .N_RO_SENSORS(16), .N_CARRY4(64)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .trigger, .busy);

  always #(half_period) clk = ~clk;

  // supply stand-in: droop while the wasters would be firing
  always @(trigger) pdn_sim_pkg::slowdown_ppm = trigger ? 100_000 : 0;
  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (trigger) trig_cycles++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int expected_hw(input int unsigned slow_ppm);
    int unsigned d, tap, n;
    longint unsigned k;
    k   = 1_000_000 + slow_ppm;
    d   = int'(16000 * k / 1_000_000) + int'(900 * k / 1_000_000);
    tap = int'(24 * k / 1_000_000);
    if (d >= 20_000) return 0;
    n = (20_000 - d + tap - 1) / tap - 1;
    return (n > 256) ? 256 : int'(n);
  endfunction

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
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle();
    logic [31:0] st;
    do axi_read(S | SEN_STATUS, st); while (st[0]);
  endtask

  initial begin
    logic [31:0] d, st;
    int e0, e1;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    axi_read(S | SEN_TDC_DELAY, d); check(d == 32'h94, "TDC delay reset value");
    axi_read(S | SEN_STATUS, st);   check(st[1:0] == 2'b10 && st[31:16] == 0, "idle and empty after reset");
    axi_read(S | SEN_DATA, d);      check(d == 0, "empty FIFO reads 0");

    // ---------------- TDC trial, trigger at cycle 20 ----------------
    axi_write(S | SEN_CTRL, 32'b1010);          // TDC enabled and selected
    axi_write(S | SEN_SAMPLES, 32'd40);
    axi_write(S | SEN_TRIG, 32'd20);
    busy_cycles = 0; trig_cycles = 0;
    axi_write(S | SEN_CTRL, 32'b1011);          // START
    wait_idle();
    check(busy_cycles == 40, $sformatf("trial lasted %0d cycles", busy_cycles));
    check(trig_cycles == 20, $sformatf("trigger high for %0d cycles", trig_cycles));
    axi_read(S | SEN_STATUS, st);
    check(st[31:16] == 40 && st[3] == 0, $sformatf("40 words logged, no overflow (%h)", st));
    e0 = expected_hw(0); e1 = expected_hw(100_000);
    check(e1 < e0, "droop lowers the expected weight");
    for (int n = 0; n < 40; n++) begin
      axi_read(S | SEN_DATA, d);
      check(d[31] == 1'b1 && d[30] == 1'b1, $sformatf("word %0d tagged TDC and valid", n));
      if (n < 20)  check(int'(d[19:0]) == e0, $sformatf("word %0d hw %0d expected %0d", n, d[19:0], e0));
      if (n >= 23) check(int'(d[19:0]) == e1, $sformatf("word %0d hw %0d expected %0d", n, d[19:0], e1));
    end
    axi_read(S | SEN_STATUS, st); check(st[1] == 1'b1, "FIFO drained");

    // ---------------- overflow ----------------
    axi_write(S | SEN_SAMPLES, 32'd100);
    axi_write(S | SEN_TRIG, 32'd1000);
    axi_write(S | SEN_CTRL, 32'b1011);
    wait_idle();
    axi_read(S | SEN_STATUS, st);
    check(st[3] == 1'b1 && st[2] == 1'b1 && st[31:16] == DEPTH, $sformatf("overflow and full (%h)", st));

    // ---------------- START with SAMPLES = 0 ----------------
    axi_write(S | SEN_SAMPLES, 32'd0);
    busy_cycles = 0;
    axi_write(S | SEN_CTRL, 32'b1011);
    repeat (5) @(negedge clk);
    axi_read(S | SEN_STATUS, st);
    check(busy_cycles == 0 && st[1] == 1'b1, "zero-length trial only clears the FIFO");

    // ---------------- RO trial at 10 MHz, trigger at cycle 10 ----------------
    half_period = 50_000;
    axi_write(S | SEN_CTRL, 32'b0100);          // RO enabled and selected
    axi_write(S | SEN_SAMPLES, 32'd30);
    axi_write(S | SEN_TRIG, 32'd10);
    axi_write(S | SEN_CTRL, 32'b0101);
    wait_idle();
    axi_read(S | SEN_STATUS, st); check(st[31:16] == 30, "30 RO words logged");
    for (int n = 0; n < 30; n++) begin
      axi_read(S | SEN_DATA, d);
      check(d[31] == 1'b0 && d[30] == 1'b1, $sformatf("word %0d tagged RO and valid", n));
      if (n < 10)  check(d[19:0] >= 16*35 && d[19:0] <= 16*36, $sformatf("RO word %0d = %0d nominal", n, d[19:0]));
      if (n >= 12) check(d[19:0] >= 16*32 && d[19:0] <= 16*33, $sformatf("RO word %0d = %0d slowed", n, d[19:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
