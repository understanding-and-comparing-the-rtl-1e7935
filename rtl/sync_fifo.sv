`timescale 1ps/1ps
// sync_fifo: single-clock first-word-fall-through FIFO that holds the sensor
// samples of one trial until they are read out over the bus. The storage is
// a DEPTH x WIDTH array with read and write pointers one bit wider than the
// address, so full and empty are told apart by the extra bit. `rd_data`
// always shows the oldest word while the FIFO is not empty; `rd_en` drops it.
// A write when full and a read when empty are ignored. `clear` empties the
// FIFO (used at the start of each trial) and wins over a write in the same
// cycle. Depth (1024) and the fall-through read are this design's choices.
//
// Ports: clk, rst_n (synchronous), clear, wr_en/wr_data, rd_en/rd_data,
// empty, full, count (words held).
module sync_fifo #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DEPTH  = 1024,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign count = wr_ptr - rd_ptr;
  assign empty = (wr_ptr == rd_ptr);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full && !clear;
  assign do_rd = rd_en && !empty && !clear;

  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // pointers never move further apart than the depth
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
