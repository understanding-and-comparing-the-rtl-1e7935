`timescale 1ps/1ps
// tb_axil_interconnect: one master BFM and two slave models with random
// ready timing behind the interconnect. Random writes and reads go to both
// address halves; each slave keeps its own 16-word memory. Checks: a write
// lands only in the slave its address bit 16 selects, reads return that
// slave's data (tagged by slave), and the unselected slave never sees a
// valid signal during a transfer.
module tb_axil_interconnect;
  import axil_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  axil_req_t req;
  axil_rsp_t rsp;
  axil_req_t m_req [2];
  axil_rsp_t m_rsp [2];
  logic [31:0] ref_mem [2][16];
  int target = -1;
  int wr_seen [2] = '{0, 0};
  int rd_seen [2] = '{0, 0};

  axil_interconnect #(.SEL_BIT(16)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .m_req, .m_rsp);

  always #5_000 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- slave models ----------------
  for (genvar i = 0; i < 2; i++) begin : g_slv
    logic [31:0] mem [16];
    logic aw_r, w_r, ar_r;
    logic got_aw, got_w, bv, rv;
    logic [3:0]  waddr;
    logic [31:0] wdata, rdata;
    always @(negedge clk) begin
      aw_r = 1'($urandom_range(0, 1));
      w_r  = 1'($urandom_range(0, 1));
      ar_r = 1'($urandom_range(0, 1));
    end
    always_comb begin
      m_rsp[i]         = '0;
      m_rsp[i].awready = aw_r && !got_aw && !bv;
      m_rsp[i].wready  = w_r && !got_w && !bv;
      m_rsp[i].bvalid  = bv;
      m_rsp[i].arready = ar_r && !rv;
      m_rsp[i].rvalid  = rv;
      m_rsp[i].rdata   = rdata;
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        got_aw <= 0; got_w <= 0; bv <= 0; rv <= 0; rdata <= '0;
        for (int k = 0; k < 16; k++) mem[k] <= '0;
      end else begin
        if (m_req[i].awvalid && m_rsp[i].awready) begin got_aw <= 1; waddr <= m_req[i].awaddr[5:2]; end
        if (m_req[i].wvalid && m_rsp[i].wready) begin got_w <= 1; wdata <= m_req[i].wdata; end
        if (got_aw && got_w && !bv) begin
          mem[waddr] <= wdata; bv <= 1; got_aw <= 0; got_w <= 0; wr_seen[i]++;
        end
        if (bv && m_req[i].bready) bv <= 0;
        if (m_req[i].arvalid && m_rsp[i].arready) begin
          rv <= 1; rdata <= mem[m_req[i].araddr[5:2]] ^ (i == 1 ? 32'hFFFF_0000 : 32'h0); rd_seen[i]++;
        end
        if (rv && m_req[i].rready) rv <= 0;
      end
    end
    // the other slave must stay quiet while this one is the target
    always @(posedge clk)
      if (rst_n && target >= 0 && target != i)
        if (m_req[i].awvalid || m_req[i].wvalid || m_req[i].arvalid) begin
          failures++; $display("FAIL: slave %0d saw a valid while slave %0d was addressed", i, target);
        end
  end

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] addr, data, got;
    int s;
    req = '0;
    foreach (ref_mem[i, k]) ref_mem[i][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      s    = $urandom_range(0, 1);
      addr = {15'd0, 1'(s), 10'd0, 4'($urandom_range(0, 15)), 2'b00};
      target = s;
      if ($urandom_range(0, 1)) begin
        data = $urandom;
        axi_write(addr, data);
        ref_mem[s][addr[5:2]] = data;
      end else begin
        axi_read(addr, got);
        check(got == (ref_mem[s][addr[5:2]] ^ (s == 1 ? 32'hFFFF_0000 : 32'h0)),
              $sformatf("read slave %0d word %0d", s, addr[5:2]));
      end
      target = -1;
      @(negedge clk);
    end
    for (int i = 0; i < 2; i++)
      for (int k = 0; k < 16; k++)
        check(g_slv[0].mem[k] == ref_mem[0][k] && g_slv[1].mem[k] == ref_mem[1][k], "slave memories hold exactly their writes");
    check(wr_seen[0] > 0 && wr_seen[1] > 0 && rd_seen[0] > 0 && rd_seen[1] > 0, "both slaves were written and read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
