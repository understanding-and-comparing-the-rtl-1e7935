`timescale 1ps/1ps
// sensor_logger: bus slave that runs a measurement trial. It holds both
// voltage sensors (the 16-ring RO sensor and the 256-tap TDC), a trial
// controller and the FIFO that keeps the samples of one trial until the
// user reads them out.
//
// Trial: writing CTRL.START with SAMPLES > 0 empties the FIFO and starts
// counting trial cycles from 0. In each of the SAMPLES cycles the output of
// the selected sensor (CTRL[1]) is pushed into the FIFO as one word (layout
// in testbed_pkg); a word that finds the FIFO full is dropped and sets the
// overflow flag. From trial cycle TRIG_CYCLE to the end of the trial the
// `trigger` output is high, so the power wasters switch on at a known point
// of the trace. Reading DATA pops the oldest word (0 when empty); STATUS
// reports busy, empty, full, overflow and the word count. The register map,
// the trigger and the FIFO depth are this design's choices.
//
// Ports: clk, rst_n, s_req/s_rsp (AXI4-Lite), trigger, busy.
// Timing: word n of a trial is the sensor output right after clock edge n
// following the START write; the TDC weight lags its launch by two cycles and
// the RO sum its counted period by one.
module sensor_logger
  import axil_pkg::*;
  import testbed_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter int unsigned N_RO_SENSORS = 16,
  parameter int unsigned N_CARRY4     = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output logic      trigger,
  output logic      busy
);

  localparam int unsigned RO_CNT_W = 16;
  localparam int unsigned RO_SUM_W = RO_CNT_W + $clog2(N_RO_SENSORS);
  localparam int unsigned N_TAPS   = 4 * N_CARRY4;
  localparam int unsigned HW_W     = $clog2(N_TAPS + 1);
  localparam int unsigned FAW      = $clog2(FIFO_DEPTH);

  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  logic        sel_tdc, ro_enable, tdc_enable, overflow;
  logic [31:0] samples, trig_cycle, cyc;
  logic [3:0]  coarse_sel, fine_sel;
  logic        start;

  logic [RO_SUM_W-1:0] ro_sum;
  logic                ro_valid;
  logic [N_TAPS-1:0]   tdc_sample;
  logic [HW_W-1:0]     tdc_hw;
  logic                tdc_valid;

  logic        f_wr, f_rd, f_empty, f_full;
  logic [31:0] f_din, f_dout;
  logic [FAW:0] f_count;

  axil_reg_port #(.ADDR_W(8)) u_port (
    .clk, .rst_n, .req(s_req), .rsp(s_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  assign start = wr_en && (wr_addr == SEN_CTRL) && wr_strb[0] && wr_data[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_tdc    <= 1'b0;
      ro_enable  <= 1'b0;
      tdc_enable <= 1'b0;
      samples    <= '0;
      trig_cycle <= '0;
      coarse_sel <= TDC_DELAY_RESET[3:0];
      fine_sel   <= TDC_DELAY_RESET[7:4];
    end else if (wr_en) begin
      case (wr_addr)
        SEN_CTRL:      if (wr_strb[0]) {tdc_enable, ro_enable, sel_tdc} <= wr_data[3:1];
        SEN_SAMPLES:   samples    <= wr_data;
        SEN_TRIG:      trig_cycle <= wr_data;
        SEN_TDC_DELAY: if (wr_strb[0]) {fine_sel, coarse_sel} <= wr_data[7:0];
        default: ;
      endcase
    end
  end

  // ---------------- trial controller ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cyc      <= '0;
      overflow <= 1'b0;
    end else if (start) begin
      busy     <= (samples != 0);
      cyc      <= '0;
      overflow <= 1'b0;
    end else if (busy) begin
      if (f_full) overflow <= 1'b1;
      cyc <= cyc + 1'b1;
      if (cyc == samples - 1) busy <= 1'b0;
    end
  end

  assign trigger = busy && (cyc >= trig_cycle);

  always_comb begin
    f_din = '0;
    if (sel_tdc) begin
      f_din[31]                   = 1'b1;
      f_din[30]                   = tdc_valid;
      f_din[SAMPLE_VALUE_W-1:0]   = SAMPLE_VALUE_W'(tdc_hw);
    end else begin
      f_din[31]                   = 1'b0;
      f_din[30]                   = ro_valid;
      f_din[SAMPLE_VALUE_W-1:0]   = SAMPLE_VALUE_W'(ro_sum);
    end
  end

  assign f_wr = busy;
  assign f_rd = rd_en && (rd_addr == SEN_DATA);

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .clear   (start),
    .wr_en   (f_wr),
    .wr_data (f_din),
    .rd_en   (f_rd),
    .rd_data (f_dout),
    .empty   (f_empty),
    .full    (f_full),
    .count   (f_count)
  );

  always_comb begin
    case (rd_addr)
      SEN_CTRL:      rd_data = {28'd0, tdc_enable, ro_enable, sel_tdc, 1'b0};
      SEN_SAMPLES:   rd_data = samples;
      SEN_TRIG:      rd_data = trig_cycle;
      SEN_TDC_DELAY: rd_data = {24'd0, fine_sel, coarse_sel};
      SEN_STATUS:    rd_data = {16'(f_count), 12'd0, overflow, f_full, f_empty, busy};
      SEN_DATA:      rd_data = f_empty ? 32'd0 : f_dout;
      default:       rd_data = 32'd0;
    endcase
  end

  // ---------------- sensors ----------------
  ro_sensor #(.N_UNITS(N_RO_SENSORS), .CNT_W(RO_CNT_W)) u_ro_sensor (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (ro_enable),
    .sum    (ro_sum),
    .valid  (ro_valid)
  );

  tdc_sensor #(.N_CARRY4(N_CARRY4)) u_tdc (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (tdc_enable),
    .coarse_sel (coarse_sel),
    .fine_sel   (fine_sel),
    .sample     (tdc_sample),
    .hw         (tdc_hw),
    .valid      (tdc_valid)
  );

endmodule
