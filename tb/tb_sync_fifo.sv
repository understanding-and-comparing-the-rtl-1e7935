`timescale 1ps/1ps
// tb_sync_fifo: random pushes and pops on an 8-deep FIFO compared against a
// queue model: data order, fall-through head, empty/full/count, writes
// ignored when full, reads ignored when empty, and clear.
module tb_sync_fifo;
  localparam int unsigned DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [31:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [3:0] count;
  logic [31:0] model [$];
  int fulls = 0, empties = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .count);

  always #5_000 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], "head word");
      if (full) fulls++;
      if (empty) empties++;
      // phases bias toward filling or draining
      wr_en   = ($urandom_range(0, 99) < ((n / 200) % 2 ? 30 : 70));
      rd_en   = ($urandom_range(0, 99) < ((n / 200) % 2 ? 70 : 30));
      clear   = (n % 500 == 499);
      wr_data = $urandom;
      begin
        bit do_wr, do_rd;
        do_wr = wr_en && model.size() < DEPTH && !clear;
        do_rd = rd_en && model.size() > 0 && !clear;
        @(posedge clk);
        if (clear) model.delete();
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    check(fulls > 0 && empties > 0, "both full and empty were reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
