`timescale 1ps/1ps
// tb_power_waster: the waster slave with 8 rings and a 16-load FF waster,
// driven over AXI4-Lite. Checks the INFO and read-back registers, that
// RO_COUNT enables exactly that many rings (saturating at N_RO) and that
// only those rings oscillate, that trigger mode holds the wasters off until
// the trigger input rises and drops them when it falls, and that arming the
// FF waster switches its source and then all of its loads.
module tb_power_waster;
  import axil_pkg::*;
  import testbed_pkg::*;
  localparam int unsigned N_RO = 8, FANOUT = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic ff_active;
  logic [15:0] ro_active_count;
  int edges [N_RO];

  power_waster #(.N_RO(N_RO), .FF_FANOUT(FANOUT)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp), .trigger, .ff_active, .ro_active_count);

  always #10_000 clk = ~clk;

  for (genvar i = 0; i < N_RO; i++) begin : g_cnt
    always @(posedge dut.ro_osc[i]) edges[i]++;
  end

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
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rings(input int n);
    foreach (edges[i]) edges[i] = 0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < N_RO; i++)
      if (i < n) check(edges[i] >= 70 && edges[i] <= 72, $sformatf("ring %0d oscillates (%0d edges)", i, edges[i]));
      else       check(edges[i] == 0, $sformatf("ring %0d rests", i));
  endtask

  initial begin
    logic [31:0] d;
    req = '0;
    pdn_sim_pkg::slowdown_ppm = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(ff_active == 0 && ro_active_count == 0, "all wasters off after reset");
    axi_read({24'd0, WST_INFO}, d);
    check(d == {16'(N_RO), 16'(FANOUT)}, $sformatf("INFO %h", d));

    // immediate mode, 5 rings
    axi_write({24'd0, WST_RO_COUNT}, 32'd5);
    axi_write({24'd0, WST_CTRL}, 32'b010);
    @(negedge clk);
    check(ro_active_count == 5, $sformatf("5 rings on (%0d)", ro_active_count));
    check(dut.ro_en == 8'b0001_1111, "thermometer enable of 5 rings");
    expect_rings(5);
    axi_read({24'd0, WST_RO_COUNT}, d); check(d == 5, "RO_COUNT reads back");
    axi_read({24'd0, WST_CTRL}, d);     check(d == 32'b010, "CTRL reads back");

    // count above the bank size saturates
    axi_write({24'd0, WST_RO_COUNT}, 32'd20);
    @(negedge clk);
    check(ro_active_count == N_RO, "count saturates at N_RO");
    check(dut.ro_en == '1, "all rings enabled");
    expect_rings(N_RO);

    // trigger mode: off until the trigger rises
    axi_write({24'd0, WST_RO_COUNT}, 32'd3);
    axi_write({24'd0, WST_CTRL}, 32'b111);
    repeat (3) @(negedge clk);
    check(ro_active_count == 0 && ff_active == 0 && dut.ro_en == '0, "armed wasters wait for the trigger");
    expect_rings(0);
    check(dut.ff_src == 1'b0 && dut.ff_loads == '0, "FF waster at rest before trigger");
    trigger = 1'b1;
    @(negedge clk);
    check(ff_active == 1 && ro_active_count == 3, "wasters fire one cycle after the trigger");
    check(dut.ff_src == 1'b0, "FF source not yet switched");
    @(negedge clk);
    check(dut.ff_src == 1'b1 && dut.ff_loads == '0, "FF source switches next");
    @(negedge clk);
    check(dut.ff_loads == '1, "all FF loads switch one cycle later");
    expect_rings(3);
    trigger = 1'b0;
    @(negedge clk);
    check(ff_active == 0 && ro_active_count == 0, "wasters stop when the trigger falls");
    repeat (3) @(negedge clk);
    expect_rings(0);
    check(dut.ff_src == 0 && dut.ff_loads == '0, "FF waster back at rest");

    // disarm
    axi_write({24'd0, WST_CTRL}, 32'b000);
    trigger = 1'b1;
    repeat (2) @(negedge clk);
    check(ff_active == 0 && ro_active_count == 0, "disarmed wasters ignore the trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
