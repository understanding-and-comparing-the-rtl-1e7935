`timescale 1ps/1ps
// ro_sensor: the RO voltage sensor made of N_UNITS (16) ro_sensor_unit
// instances. Every clock cycle the per-period counts of all units are added
// into one data point; sum / N_UNITS is the average count the measurements
// use. Adding in hardware (rather than after read-out) is this design's
// choice, so that one 32-bit word per cycle carries the data point.
//
// Ports: clk, rst_n, enable (starts all rings), sum, valid.
// Timing: sum is registered one cycle after the unit counts, so it holds the
// counts of the period that ended one edge earlier. valid is high from the
// third clock edge after enable rises, the first sum whose whole counted
// period had the rings enabled.
module ro_sensor #(
  parameter int unsigned N_UNITS = 16,
  parameter int unsigned CNT_W   = 16,
  localparam int unsigned SUM_W  = CNT_W + $clog2(N_UNITS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic [SUM_W-1:0] sum,
  output logic             valid
);

  logic [CNT_W-1:0] count [N_UNITS];
  logic [SUM_W-1:0] total;
  logic             en_d1, en_d2;

  for (genvar i = 0; i < N_UNITS; i++) begin : g_unit
    ro_sensor_unit #(.CNT_W(CNT_W)) u_unit (
      .clk    (clk),
      .rst_n  (rst_n),
      .enable (enable),
      .count  (count[i])
    );
  end

  always_comb begin
    total = '0;
    for (int i = 0; i < N_UNITS; i++) total = total + SUM_W'(count[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum   <= '0;
      valid <= 1'b0;
      en_d1 <= 1'b0;
      en_d2 <= 1'b0;
    end else begin
      sum   <= total;
      en_d1 <= enable;
      en_d2 <= en_d1;
      valid <= en_d1 && en_d2;
    end
  end

endmodule
