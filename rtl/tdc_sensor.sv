`timescale 1ps/1ps
// tdc_sensor: time-to-digital-converter voltage sensor. The controller
// launches a rising edge at every clock edge; it passes a coarse and a fine
// adjustable delay and then a chain of N_CARRY4 CARRY4 primitives (256 taps
// for 64). At the next clock edge the taps are sampled and their Hamming
// weight is the output: the number of taps the edge reached within one
// clock period. A supply drop slows every element and lowers the weight;
// when the initial delay alone exceeds the period, the weight is 0 (the
// sensor's range ends there).
//
// Calibration: coarse_sel / fine_sel set the initial delay so that the edge
// stops part way along the chain at the chosen clock frequency. In this
// model the coarse stage gives 12 ns + 1 ns steps and the fine stage 100 ps
// steps (this design's choice); coarse 4, fine 9 suits a 50 MHz clock.
//
// Ports: clk, rst_n, enable, coarse_sel, fine_sel, sample (256 captured
// taps), hw (Hamming weight), valid.
// Timing: the edge launched at clock edge k is captured at k+1 and its
// weight appears on hw after edge k+2, with valid high.
module tdc_sensor #(
  parameter int unsigned N_CARRY4 = 64,
  localparam int unsigned N_TAPS  = 4 * N_CARRY4,
  localparam int unsigned HW_W    = $clog2(N_TAPS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [3:0]        coarse_sel,
  input  logic [3:0]        fine_sel,
  output logic [N_TAPS-1:0] sample,
  output logic [HW_W-1:0]   hw,
  output logic              valid
);

  logic launch, en_gate, d_coarse, d_fine;
  logic [N_TAPS-1:0] taps;
  logic v_launch, v_sample;

  tdc_controller u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .enable  (enable),
    .launch  (launch),
    .en_gate (en_gate)
  );

  tdc_adj_delay #(.SEL_W(4), .BASE_PS(12000), .STEP_PS(1000)) u_coarse (
    .sel  (coarse_sel),
    .din  (launch),
    .dout (d_coarse)
  );

  tdc_adj_delay #(.SEL_W(4), .BASE_PS(0), .STEP_PS(100)) u_fine (
    .sel  (fine_sel),
    .din  (d_coarse),
    .dout (d_fine)
  );

  tdc_carry_chain #(.N_CARRY4(N_CARRY4)) u_chain (
    .cin  (d_fine),
    .taps (taps)
  );

  tdc_sampler #(.N_TAPS(N_TAPS)) u_sampler (
    .clk    (clk),
    .rst_n  (rst_n),
    .taps   (taps),
    .sample (sample),
    .hw     (hw)
  );

  // valid follows the launched edge through capture and count
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_launch <= 1'b0;
      v_sample <= 1'b0;
      valid    <= 1'b0;
    end else begin
      v_launch <= en_gate;
      v_sample <= v_launch;
      valid    <= v_sample;
    end
  end

endmodule
