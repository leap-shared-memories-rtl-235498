// tb_heat_transfer: the 2-D heat-transfer stencil run on the coherent
// memory by three engines, with the hardware barrier between time steps.
// The original run (a 512 x 512 grid for 128 steps) needs 65,536 lines and
// does not fit a 14-bit line address, so this bench keeps the 128 time steps
// and takes the largest grid that fits with three engines: 256 x 255
// points, 16,320 lines.
// Layout as in the original experiment: 8-bit grid points, 8 per 64-bit
// line (the top is built with CLIENT_W = 8, so the marshaller does the
// packing), two frame buffers interleaved row by row in row-major order.
// Each engine owns 85 rows.  Per step it reads the five-point neighbourhood of
// each of its interior points from buffer t mod 2, writes
// (4*c + n + s + e + w) / 8 to buffer (t+1) mod 2, then meets the other two
// at the barrier.  Rows at block borders are shared, so lines move between
// caches every step.  Checks: every point of the final frame, read by the
// neighbouring engine, equals a reference computed in the bench; the grid is
// never read before the barrier of the step that wrote it.
`timescale 1ns/1ps
module tb_heat_transfer;
  import leap_pkg::*;
  localparam int NE = 3, GW = 256, GH = 255, T = 128, RPE = GH / NE;
  localparam int CAW = ADDR_W + 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [NE-1:0] creq_valid, creq_ready, crsp_valid, request_pending;
  op_kind_e      creq_op [NE];
  logic [CAW-1:0] creq_addr [NE];
  logic [7:0]    creq_wdata [NE], crsp_data [NE];
  logic own_req_valid, own_req_ready, own_req_write, own_req_wdata, own_rsp_valid, own_rsp_data;
  logic dat_req_valid, dat_req_ready, dat_req_write, dat_rsp_valid, ctrl_idle;
  addr_t own_req_addr, dat_req_addr;
  data_t dat_req_wdata, dat_rsp_data;
  logic [3:0] acq_ready, grant_valid, rel_ready;
  logic [0:0] acq_id [4], grant_id [4], rel_id [4];
  logic [NE-1:0] bar_init, bar_reached_valid, bar_reached_ready, bar_sync;
  logic          bar_set_valid, bar_set_ready;

  leap_top #(.CLIENT_W(8), .BAR_NODES(NE)) dut (
    .clk, .rst_n,
    .creq_valid, .creq_ready, .creq_op, .creq_addr, .creq_wdata,
    .crsp_valid, .crsp_data, .request_pending,
    .own_req_valid, .own_req_ready, .own_req_write, .own_req_addr, .own_req_wdata,
    .own_rsp_valid, .own_rsp_data,
    .dat_req_valid, .dat_req_ready, .dat_req_write, .dat_req_addr, .dat_req_wdata,
    .dat_rsp_valid, .dat_rsp_data, .ctrl_idle,
    .acq_valid(4'b0), .acq_id, .acq_ready, .grant_valid, .grant_id,
    .rel_valid(4'b0), .rel_id, .rel_ready,
    .bar_initialized(bar_init), .bar_set_valid, .bar_set_mask(3'b111), .bar_set_ready,
    .bar_reached_valid, .bar_reached_ready, .bar_sync_valid(bar_sync)
  );
  pscratch_model #(.W(1),  .AW(ADDR_W), .LAT(3), .INIT_ADDR(1'b0)) u_own (
    .clk, .rst_n, .req_valid(own_req_valid), .req_ready(own_req_ready),
    .req_write(own_req_write), .req_addr(own_req_addr), .req_wdata(own_req_wdata),
    .rsp_valid(own_rsp_valid), .rsp_data(own_rsp_data));
  pscratch_model #(.W(64), .AW(ADDR_W), .LAT(5), .INIT_ADDR(1'b0)) u_dat (
    .clk, .rst_n, .req_valid(dat_req_valid), .req_ready(dat_req_ready),
    .req_write(dat_req_write), .req_addr(dat_req_addr), .req_wdata(dat_req_wdata),
    .rsp_valid(dat_rsp_valid), .rsp_data(dat_rsp_data));

  // reference frame after T steps
  int ref_u [GH][GW];
  int ref_n [GH][GW];
  function automatic int init_val(input int x, input int y);
    return (x * 37 + y * 91 + x * y) % 256;
  endfunction
  function automatic logic [CAW-1:0] paddr(input int b, input int x, input int y);
    return CAW'((y * 2 + b) * GW + x);
  endfunction

  int step_done [NE];
  longint t_start, t_end;

  for (genvar g = 0; g < NE; g++) begin : g_eng
    task automatic issue(input op_kind_e op, input logic [CAW-1:0] a, input logic [7:0] d);
      @(negedge clk);
      creq_valid[g] = 1; creq_op[g] = op; creq_addr[g] = a; creq_wdata[g] = d;
      #1; while (!creq_ready[g]) begin @(negedge clk); #1; end
      @(posedge clk); #1; creq_valid[g] = 0;
    endtask
    task automatic rd(input logic [CAW-1:0] a, output int v);
      issue(OP_READ, a, '0);
      while (!crsp_valid[g]) begin @(posedge clk); #1; end
      v = int'(crsp_data[g]);
    endtask
    task automatic barrier();
      @(negedge clk); bar_reached_valid[g] = 1;
      #1; while (!bar_reached_ready[g]) begin @(negedge clk); #1; end
      @(posedge clk); #1; bar_reached_valid[g] = 0;
      while (!bar_sync[g]) begin @(posedge clk); #1; end
    endtask

    initial begin
      automatic int c, n, s, e, w, v;
      creq_valid[g] = 0; creq_op[g] = OP_READ; creq_addr[g] = '0; creq_wdata[g] = '0;
      bar_reached_valid[g] = 0;
      step_done[g] = 0;
      wait (rst_n);
      wait (bar_init[g]);
      // initial frame in both buffers
      for (int y = g * RPE; y < (g + 1) * RPE; y++)
        for (int x = 0; x < GW; x++) begin
          issue(OP_WRITE, paddr(0, x, y), 8'(init_val(x, y)));
          issue(OP_WRITE, paddr(1, x, y), 8'(init_val(x, y)));
        end
      issue(OP_FENCE_WR, '0, '0);
      barrier();
      if (g == 0) t_start = $time;
      for (int t = 0; t < T; t++) begin
        for (int y = g * RPE; y < (g + 1) * RPE; y++) begin
          if (y == 0 || y == GH - 1) continue;
          for (int x = 1; x < GW - 1; x++) begin
            rd(paddr(t % 2, x, y), c);
            rd(paddr(t % 2, x, y - 1), n);
            rd(paddr(t % 2, x, y + 1), s);
            rd(paddr(t % 2, x - 1, y), w);
            rd(paddr(t % 2, x + 1, y), e);
            issue(OP_WRITE, paddr((t + 1) % 2, x, y), 8'((4 * c + n + s + e + w) / 8));
          end
        end
        issue(OP_FENCE_FULL, '0, '0);
        barrier();
        step_done[g] = t + 1;
      end
      if (g == 0) t_end = $time;
      // the next engine's block of the final frame
      for (int y = ((g + 1) % NE) * RPE; y < ((g + 1) % NE + 1) * RPE; y++)
        for (int x = 0; x < GW; x++) begin
          rd(paddr(T % 2, x, y), v);
          check(v == ref_u[y][x], $sformatf("engine %0d point (%0d,%0d): %0d want %0d", g, x, y, v, ref_u[y][x]));
        end
      step_done[g] = T + 1;
    end
  end

  // no engine may run ahead of the barrier
  always @(posedge clk)
    for (int i = 0; i < NE; i++)
      for (int j = 0; j < NE; j++)
        if (step_done[i] <= T && step_done[j] <= T && step_done[i] > step_done[j] + 1) begin
          check(0, "engine ran ahead of the barrier");
        end

  initial begin
    for (int y = 0; y < GH; y++) for (int x = 0; x < GW; x++) ref_u[y][x] = init_val(x, y);
    for (int t = 0; t < T; t++) begin
      for (int y = 0; y < GH; y++)
        for (int x = 0; x < GW; x++)
          if (x == 0 || y == 0 || x == GW - 1 || y == GH - 1) ref_n[y][x] = ref_u[y][x];
          else ref_n[y][x] = (4 * ref_u[y][x] + ref_u[y - 1][x] + ref_u[y + 1][x] +
                              ref_u[y][x - 1] + ref_u[y][x + 1]) / 8;
      ref_u = ref_n;
    end
    bar_set_valid = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); bar_set_valid = 1;
    #1; while (!bar_set_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1; bar_set_valid = 0;
    wait (step_done[0] == T + 1 && step_done[1] == T + 1 && step_done[2] == T + 1);
    $display("%0d steps of a %0dx%0d grid on %0d engines: %0d cycles per step", T, GW, GH, NE,
             int'((t_end - t_start) / 10) / T);
    check(checks >= GW * GH, "whole final frame checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
