`timescale 1ps/1ps
// tb_testbed_top: end-to-end test of the testbed at reduced size (100 RO
// wasters, 700-load FF waster, 64-word FIFO; sensors at full size). The
// experiment itself is in testbed_driver.
module tb_testbed_top;
  import axil_pkg::*;
  localparam int unsigned N_RO = 100, FANOUT = 700, DEPTH = 64;
  logic clk, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  logic trial_busy, waster_trigger, ff_waster_on;
  logic [15:0] ro_wasters_on;

  testbed_top #(.N_RO_WASTERS(N_RO), .FF_FANOUT(FANOUT), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .trial_busy, .waster_trigger, .ff_waster_on, .ro_wasters_on);

  testbed_driver #(.N_RO(N_RO), .FANOUT(FANOUT), .DEPTH(DEPTH)) u_drv (
    .clk, .rst_n, .req, .rsp, .trial_busy, .waster_trigger, .ff_waster_on, .ro_wasters_on,
    .ff_src (dut.u_waster.u_ff.src_q));
endmodule
