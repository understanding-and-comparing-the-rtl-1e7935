`timescale 1ps/1ps
// power_waster: bus-controlled power wasting circuits that pull the on-chip
// supply down on purpose. It holds one FF waster (a flip-flop driving
// FF_FANOUT loads, a short burst on one clock edge) and a bank of N_RO
// ring-oscillator wasters (continuous current, set by how many rings run).
//
// Registers (offsets in testbed_pkg): CTRL arms the FF waster and the RO
// wasters and picks the trigger mode; RO_COUNT sets how many rings run;
// INFO reports N_RO and FF_FANOUT. When armed, the wasters fire either at
// once (trigger mode 0) or while the `trigger` input from the trial
// controller is high (mode 1), so they switch on at a known cycle of the
// trial. The register map and trigger input are this design's choices.
//
// Timing: the FF waster enable and the ring enables are registered, so they
// change one cycle after `trigger`; the FF waster's source flip-flop
// switches one cycle later, its loads one more cycle later.
// Ports: clk, rst_n, s_req/s_rsp (AXI4-Lite), trigger, ff_active (FF waster
// enable), ro_active_count (rings currently enabled).
module power_waster
  import axil_pkg::*;
  import testbed_pkg::*;
#(
  parameter int unsigned N_RO      = 1000,
  parameter int unsigned FF_FANOUT = 7000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_req,
  output axil_rsp_t   s_rsp,
  input  logic        trigger,
  output logic        ff_active,
  output logic [15:0] ro_active_count
);

  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  logic        ff_arm, ro_arm, trig_mode;
  logic [15:0] ro_count;
  logic        fire;
  logic [N_RO-1:0] ro_en;
  logic [N_RO-1:0] ro_osc;
  logic            ff_src;
  logic [FF_FANOUT-1:0] ff_loads;

  axil_reg_port #(.ADDR_W(8)) u_port (
    .clk, .rst_n, .req(s_req), .rsp(s_rsp),
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ff_arm    <= 1'b0;
      ro_arm    <= 1'b0;
      trig_mode <= 1'b0;
      ro_count  <= '0;
    end else if (wr_en) begin
      case (wr_addr)
        WST_CTRL:     if (wr_strb[0]) {trig_mode, ro_arm, ff_arm} <= wr_data[2:0];
        WST_RO_COUNT: begin
          if (wr_strb[0]) ro_count[7:0]  <= wr_data[7:0];
          if (wr_strb[1]) ro_count[15:8] <= wr_data[15:8];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    case (rd_addr)
      WST_CTRL:     rd_data = {29'd0, trig_mode, ro_arm, ff_arm};
      WST_RO_COUNT: rd_data = {16'd0, ro_count};
      WST_INFO:     rd_data = {16'(N_RO), 16'(FF_FANOUT)};
      default:      rd_data = 32'd0;
    endcase
  end

  assign fire = trig_mode ? trigger : 1'b1;

  // thermometer enable: rings 0 .. ro_count-1 run while fired
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ff_active <= 1'b0;
      ro_en     <= '0;
    end else begin
      ff_active <= ff_arm && fire;
      for (int i = 0; i < N_RO; i++)
        ro_en[i] <= ro_arm && fire && (32'(i) < 32'(ro_count));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ro_active_count <= '0;
    else if (ro_arm && fire) ro_active_count <= (32'(ro_count) > N_RO) ? 16'(N_RO) : ro_count;
    else ro_active_count <= '0;
  end

  ff_waster #(.FANOUT(FF_FANOUT)) u_ff (
    .clk    (clk),
    .enable (ff_active),
    .src_q  (ff_src),
    .load_q (ff_loads)
  );

  ro_waster_bank #(.N_RO(N_RO)) u_ro (
    .enable (ro_en),
    .osc    (ro_osc)
  );

endmodule
