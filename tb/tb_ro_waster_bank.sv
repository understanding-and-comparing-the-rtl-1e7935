`timescale 1ps/1ps
// tb_ro_waster_bank: enables a chosen subset of an 8-ring bank and checks
// that exactly those rings oscillate, each near the 356 MHz nominal rate,
// while the others rest.
module tb_ro_waster_bank;
  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] enable = '0;
  logic [N-1:0] osc;
  int edges [N];

  ro_waster_bank #(.N_RO(N)) dut (.enable, .osc);

  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge osc[i]) edges[i]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] pat;
    pdn_sim_pkg::slowdown_ppm = 0;
    for (int r = 0; r < 4; r++) begin
      pat = (r == 0) ? 8'h00 : (r == 1) ? 8'h0F : (r == 2) ? 8'hA5 : 8'hFF;
      enable = pat;
      #10_000;
      foreach (edges[i]) edges[i] = 0;
      #500_000;
      for (int i = 0; i < N; i++) begin
        if (pat[i]) check(edges[i] >= 177 && edges[i] <= 179, $sformatf("ring %0d runs (%0d edges)", i, edges[i]));
        else        check(edges[i] == 0, $sformatf("ring %0d rests", i));
      end
      enable = '0;
      #20_000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
