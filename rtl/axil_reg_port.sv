`timescale 1ps/1ps
// axil_reg_port: AXI4-Lite slave front end that turns bus transfers into
// simple register strobes for the testbed's slaves.
//
// Write: when AW and W are both valid and no response is pending, both are
// accepted in the same cycle, `wr_en` pulses with the address, data and
// strobes, and an OKAY response is held on B until it is taken. Read: when
// AR is valid and no read data is pending, it is accepted, `rd_en` pulses
// with the address, the slave's `rd_data` (combinational from rd_addr) is
// registered, and held on R until it is taken. One transfer of each kind is
// in flight at a time. Only the low ADDR_W address bits reach the slave.
//
// Timing: wr_en / rd_en in the handshake cycle, BVALID / RVALID from the
// next cycle.
module axil_reg_port
  import axil_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         req,
  output axil_rsp_t         rsp,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic [3:0]        wr_strb,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [31:0]       rd_data
);

  logic        bvalid, rvalid;
  logic [31:0] rdata;

  assign wr_en   = req.awvalid && req.wvalid && !bvalid;
  assign wr_addr = req.awaddr[ADDR_W-1:0];
  assign wr_data = req.wdata;
  assign wr_strb = req.wstrb;
  assign rd_en   = req.arvalid && !rvalid;
  assign rd_addr = req.araddr[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid <= 1'b0;
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (wr_en)                   bvalid <= 1'b1;
      else if (bvalid && req.bready) bvalid <= 1'b0;
      if (rd_en) begin
        rvalid <= 1'b1;
        rdata  <= rd_data;
      end else if (rvalid && req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = rd_en;
    rsp.rvalid  = rvalid;
    rsp.rdata   = rdata;
    rsp.rresp   = RESP_OKAY;
  end

  // a response stays valid until it is taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n) bvalid && !req.bready |=> bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n) rvalid && !req.rready |=> rvalid && $stable(rdata));

endmodule
