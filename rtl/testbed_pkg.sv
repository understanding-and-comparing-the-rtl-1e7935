`timescale 1ps/1ps
// testbed_pkg: address map and register layout of the voltage-sensor testbed.
//
// Address bit 16 selects the slave behind the interconnect:
//   0x0000_xxxx  power waster slave
//   0x0001_xxxx  sensor / FIFO slave
// Offsets are byte addresses inside a slave; all registers are 32 bits.
// The map itself is this design's own choice.
package testbed_pkg;

  localparam int unsigned SLAVE_SEL_BIT = 16;
  localparam logic [31:0] WASTER_BASE = 32'h0000_0000;
  localparam logic [31:0] SENSOR_BASE = 32'h0001_0000;

  // ---- power waster slave ----
  // CTRL: [0] FF waster armed, [1] RO wasters armed,
  //       [2] trigger mode (1: fire only while the trial trigger is high,
  //           0: fire as soon as armed)
  localparam logic [7:0] WST_CTRL     = 8'h00;
  // RO_COUNT: number of RO wasters to enable (saturates at N_RO)
  localparam logic [7:0] WST_RO_COUNT = 8'h04;
  // INFO (read only): [31:16] N_RO, [15:0] FF fanout
  localparam logic [7:0] WST_INFO     = 8'h08;

  // ---- sensor slave ----
  // CTRL: [0] START (write 1, self clearing), [1] logged sensor (0 RO, 1 TDC),
  //       [2] RO sensor enable, [3] TDC sensor enable
  localparam logic [7:0] SEN_CTRL      = 8'h00;
  localparam logic [7:0] SEN_SAMPLES   = 8'h04;  // samples (cycles) per trial
  localparam logic [7:0] SEN_TRIG      = 8'h08;  // trial cycle at which the wasters fire
  localparam logic [7:0] SEN_TDC_DELAY = 8'h0C;  // [3:0] coarse, [7:4] fine delay setting
  // STATUS (read only): [0] busy, [1] FIFO empty, [2] FIFO full,
  //                     [3] overflow (a sample was dropped), [31:16] FIFO count
  localparam logic [7:0] SEN_STATUS    = 8'h10;
  localparam logic [7:0] SEN_DATA      = 8'h14;  // read pops one FIFO word

  // TDC delay setting at reset: coarse 4, fine 9, which puts the launched
  // edge near the middle of the 256-tap chain at a 50 MHz clock.
  localparam logic [7:0] TDC_DELAY_RESET = 8'h94;

  // FIFO word: [31] sensor (0 RO, 1 TDC), [30] sensor output valid,
  //            [19:0] value (RO: sum of the 16 counts, TDC: Hamming weight)
  localparam int unsigned SAMPLE_VALUE_W = 20;

endpackage
