`timescale 1ps/1ps
// axil_pkg: the 32-bit AXI4-Lite request and response bundles used on every
// link of the testbed (JTAG master -> interconnect -> slaves). The request
// carries everything a master drives (AW, W, B-ready, AR, R-ready), the
// response everything a slave drives. Only single-beat AXI4-Lite transfers
// are used; bursts, IDs and PROT are not carried.
package axil_pkg;

  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  localparam logic [1:0] RESP_OKAY = 2'b00;

endpackage
