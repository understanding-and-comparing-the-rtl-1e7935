`timescale 1ps/1ps
// axil_interconnect: AXI4-Lite crossbar from the single bus master (the
// JTAG-to-AXI converter) to the testbed's two slaves, chosen by address bit
// SEL_BIT: 0 goes to m_req[0] (power waster), 1 to m_req[1] (sensor / FIFO).
//
// How: the write and read paths are independent and each carries one
// transaction at a time. A path is idle until the master raises AWVALID
// (ARVALID); it then latches the slave select from the address (one cycle),
// connects the master to that slave until AW and W (AR) have been accepted
// and the B (R) response has been taken, and returns to idle. The slave not
// selected sees no valid signals. The two-slave, one-at-a-time structure is
// this design's choice; addresses are passed unchanged.
//
// Ports: s_req/s_rsp (from the master), m_req[2]/m_rsp[2] (to the slaves).
module axil_interconnect
  import axil_pkg::*;
#(
  parameter int unsigned SEL_BIT = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [2],
  input  axil_rsp_t m_rsp [2]
);

  logic wr_act, wr_sel, aw_done, w_done;
  logic rd_act, rd_sel, ar_done;

  // ---------------- write path ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_act  <= 1'b0;
      wr_sel  <= 1'b0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else if (!wr_act) begin
      if (s_req.awvalid) begin
        wr_act <= 1'b1;
        wr_sel <= s_req.awaddr[SEL_BIT];
      end
    end else begin
      if (s_req.awvalid && s_rsp.awready) aw_done <= 1'b1;
      if (s_req.wvalid && s_rsp.wready)   w_done  <= 1'b1;
      if (s_rsp.bvalid && s_req.bready) begin
        wr_act  <= 1'b0;
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end
    end
  end

  // ---------------- read path ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_act  <= 1'b0;
      rd_sel  <= 1'b0;
      ar_done <= 1'b0;
    end else if (!rd_act) begin
      if (s_req.arvalid) begin
        rd_act <= 1'b1;
        rd_sel <= s_req.araddr[SEL_BIT];
      end
    end else begin
      if (s_req.arvalid && s_rsp.arready) ar_done <= 1'b1;
      if (s_rsp.rvalid && s_req.rready) begin
        rd_act  <= 1'b0;
        ar_done <= 1'b0;
      end
    end
  end

  // ---------------- routing ----------------
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      m_req[i]         = s_req;
      m_req[i].awvalid = s_req.awvalid && wr_act && !aw_done && (wr_sel == 1'(i));
      m_req[i].wvalid  = s_req.wvalid  && wr_act && !w_done  && (wr_sel == 1'(i));
      m_req[i].bready  = s_req.bready  && wr_act && (wr_sel == 1'(i));
      m_req[i].arvalid = s_req.arvalid && rd_act && !ar_done && (rd_sel == 1'(i));
      m_req[i].rready  = s_req.rready  && rd_act && (rd_sel == 1'(i));
    end

    s_rsp         = '0;
    s_rsp.awready = wr_act && !aw_done && m_rsp[wr_sel].awready;
    s_rsp.wready  = wr_act && !w_done  && m_rsp[wr_sel].wready;
    s_rsp.bvalid  = wr_act && m_rsp[wr_sel].bvalid;
    s_rsp.bresp   = m_rsp[wr_sel].bresp;
    s_rsp.arready = rd_act && !ar_done && m_rsp[rd_sel].arready;
    s_rsp.rvalid  = rd_act && m_rsp[rd_sel].rvalid;
    s_rsp.rdata   = m_rsp[rd_sel].rdata;
    s_rsp.rresp   = m_rsp[rd_sel].rresp;
  end

  // the master must hold a write address until it is accepted
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.awvalid && !s_rsp.awready |=> s_req.awvalid && $stable(s_req.awaddr));
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.arvalid && !s_rsp.arready |=> s_req.arvalid && $stable(s_req.araddr));

endmodule
