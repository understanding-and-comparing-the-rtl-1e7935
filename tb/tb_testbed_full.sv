`timescale 1ps/1ps
// tb_testbed_full: the end-to-end experiment of testbed_driver on the
// testbed at its full default size: 1,000 RO wasters, a 7,000-load FF
// waster, the 16-ring RO sensor, the 256-tap TDC and a 1,024-word FIFO.
module tb_testbed_full;
  import axil_pkg::*;
  logic clk, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  logic trial_busy, waster_trigger, ff_waster_on;
  logic [15:0] ro_wasters_on;

  testbed_top dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .trial_busy, .waster_trigger, .ff_waster_on, .ro_wasters_on);

  testbed_driver #(.N_RO(1000), .FANOUT(7000), .DEPTH(1024)) u_drv (
    .clk, .rst_n, .req, .rsp, .trial_busy, .waster_trigger, .ff_waster_on, .ro_wasters_on,
    .ff_src (dut.u_waster.u_ff.src_q));
endmodule
