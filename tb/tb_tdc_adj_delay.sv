`timescale 1ps/1ps
// tb_tdc_adj_delay: measures the time from a din edge to the dout edge for
// every setting of a coarse-type instance (12 ns + sel x 1 ns) and checks
// it, with and without supply slowdown, for rising and falling edges.
module tb_tdc_adj_delay;
  int checks = 0, failures = 0;
  logic [3:0] sel = '0;
  logic din = 1'b0, dout;

  tdc_adj_delay #(.SEL_W(4), .BASE_PS(12000), .STEP_PS(1000)) dut (.sel, .din, .dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    longint exp_ps;
    for (int s = 0; s < 2; s++) begin
      pdn_sim_pkg::slowdown_ppm = (s == 0) ? 0 : 50_000;
      for (int k = 0; k < 16; k++) begin
        sel = 4'(k);
        #40_000;
        exp_ps = (longint'(12000 + 1000 * k) * (1_000_000 + pdn_sim_pkg::slowdown_ppm)) / 1_000_000;
        t0 = $time; din = ~din;
        @(dout);
        check(($time - t0) == exp_ps, $sformatf("sel %0d slow %0d: delay %0t expected %0d",
                                                k, pdn_sim_pkg::slowdown_ppm, $time - t0, exp_ps));
        check(dout == din, "dout takes din's value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
