`timescale 1ps/1ps
// testbed_top: on-chip voltage-sensor testbed. A user reaches the FPGA over
// JTAG through a JTAG-to-AXI converter (vendor IP, outside this design),
// whose 32-bit AXI4-Lite master port drives `s_axil_req` / `s_axil_rsp`. An
// interconnect routes each transfer to one of two slaves: the power waster
// slave (FF waster with FF_FANOUT loads, N_RO ring-oscillator wasters) at
// 0x0000_xxxx, and the sensor slave (RO sensor of N_RO_SENSORS rings, TDC of
// N_CARRY4 CARRY4 primitives, trial controller and FIFO_DEPTH-word FIFO) at
// 0x0001_xxxx. The trial controller's trigger is wired to the wasters so
// that, in trigger mode, they switch on at a programmed cycle of the trial
// while the sensor trace is being logged.
//
// Everything runs on one clock `clk`, which is also the sensor sampling
// clock (10 MHz for RO sensor runs and 50 MHz for TDC runs in the
// measurements); rst_n is synchronous and active low.
// Ports: clk, rst_n, s_axil_req/s_axil_rsp, trial_busy (a trial is logging),
// waster_trigger (the trial has reached its trigger cycle), ff_waster_on
// (FF waster enable), ro_wasters_on (number of rings enabled).
module testbed_top
  import axil_pkg::*;
#(
  parameter int unsigned N_RO_WASTERS = 1000,
  parameter int unsigned FF_FANOUT    = 7000,
  parameter int unsigned N_RO_SENSORS = 16,
  parameter int unsigned N_CARRY4     = 64,
  parameter int unsigned FIFO_DEPTH   = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output logic        trial_busy,
  output logic        waster_trigger,
  output logic        ff_waster_on,
  output logic [15:0] ro_wasters_on
);

  axil_req_t   m_req [2];
  axil_rsp_t   m_rsp [2];

  axil_interconnect #(.SEL_BIT(testbed_pkg::SLAVE_SEL_BIT)) u_xbar (
    .clk, .rst_n,
    .s_req (s_axil_req),
    .s_rsp (s_axil_rsp),
    .m_req (m_req),
    .m_rsp (m_rsp)
  );

  power_waster #(.N_RO(N_RO_WASTERS), .FF_FANOUT(FF_FANOUT)) u_waster (
    .clk, .rst_n,
    .s_req           (m_req[0]),
    .s_rsp           (m_rsp[0]),
    .trigger         (waster_trigger),
    .ff_active       (ff_waster_on),
    .ro_active_count (ro_wasters_on)
  );

  sensor_logger #(
    .FIFO_DEPTH   (FIFO_DEPTH),
    .N_RO_SENSORS (N_RO_SENSORS),
    .N_CARRY4     (N_CARRY4)
  ) u_sensor (
    .clk, .rst_n,
    .s_req   (m_req[1]),
    .s_rsp   (m_rsp[1]),
    .trigger (waster_trigger),
    .busy    (trial_busy)
  );

endmodule
