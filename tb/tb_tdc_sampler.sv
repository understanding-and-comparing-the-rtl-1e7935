`timescale 1ps/1ps
// tb_tdc_sampler: drives random and thermometer-coded tap patterns into the
// 256 sampling flip-flops and checks the captured sample one edge later and
// its Hamming weight (counted here with $countones) one edge after that.
module tb_tdc_sampler;
  localparam int unsigned N = 256;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] taps = '0;
  logic [N-1:0] sample;
  logic [8:0]   hw;
  logic [N-1:0] hist [3];

  tdc_sampler #(.N_TAPS(N)) dut (.clk, .rst_n, .taps, .sample, .hw);

  always #10_000 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      hist[1] = hist[0];
      if (n % 2 == 0) begin
        for (int w = 0; w < N / 32; w++) taps[w*32 +: 32] = $urandom;
      end else begin
        int k;
        k = $urandom_range(0, N);
        taps = (k == 0) ? '0 : ({N{1'b1}} >> (N - k));   // k low taps set
      end
      hist[0] = taps;
      @(posedge clk); #1;
      check(sample == hist[0], "sample is the taps at the last edge");
      if (n > 0) check(int'(hw) == $countones(hist[1]), $sformatf("hw %0d expected %0d", hw, $countones(hist[1])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
