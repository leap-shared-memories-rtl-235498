// tb_synthetic: latency and throughput probes of the coherence domain at its
// default size (three clients, 1024-line caches), in the spirit of the
// synthetic hit-latency and throughput measurements of the original design.
// Latency is measured from the cycle a read is accepted to the cycle its data
// is returned, for three cases:
//   * local hit                  (line already in the client's cache)
//   * next-level memory          (line owned by memory: owner-bit lookup,
//                                 then data read, in the controller)
//   * remote cache               (line owned, dirty, by another client)
// Throughput: 1, 2 and then 3 clients at once each stream 512 reads and then
// 512 writes over their own cold region (no sharing, so no coherence traffic
// between clients); the 3-client streams are then repeated warm.
// Checks: data of every read, a one-cycle local hit, that remote and memory
// reads cost more than hits, that clients sharing the one controller are no
// faster than one alone, and that warm hits stream at one per cycle.  Cycle
// counts are printed.
`timescale 1ns/1ps
module tb_synthetic;
  import leap_pkg::*;
  localparam int N = 3, LEN = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [N-1:0] creq_valid, creq_ready, crsp_valid, request_pending;
  op_kind_e     creq_op [N];
  logic [ADDR_W-1:0] creq_addr [N];
  data_t        creq_wdata [N], crsp_data [N];
  logic own_req_valid, own_req_ready, own_req_write, own_req_wdata, own_rsp_valid, own_rsp_data;
  logic dat_req_valid, dat_req_ready, dat_req_write, dat_rsp_valid, ctrl_idle;
  addr_t own_req_addr, dat_req_addr;
  data_t dat_req_wdata, dat_rsp_data;
  logic [3:0] acq_ready, grant_valid, rel_ready;
  logic [0:0] acq_id [4], grant_id [4], rel_id [4];
  logic [1:0] bar_init, bar_reached_ready, bar_sync;
  logic       bar_set_ready;

  leap_top dut (
    .clk, .rst_n,
    .creq_valid, .creq_ready, .creq_op, .creq_addr, .creq_wdata,
    .crsp_valid, .crsp_data, .request_pending,
    .own_req_valid, .own_req_ready, .own_req_write, .own_req_addr, .own_req_wdata,
    .own_rsp_valid, .own_rsp_data,
    .dat_req_valid, .dat_req_ready, .dat_req_write, .dat_req_addr, .dat_req_wdata,
    .dat_rsp_valid, .dat_rsp_data, .ctrl_idle,
    .acq_valid(4'b0), .acq_id, .acq_ready, .grant_valid, .grant_id,
    .rel_valid(4'b0), .rel_id, .rel_ready,
    .bar_initialized(bar_init), .bar_set_valid(1'b0), .bar_set_mask(2'b11), .bar_set_ready,
    .bar_reached_valid(2'b00), .bar_reached_ready, .bar_sync_valid(bar_sync)
  );
  pscratch_model #(.W(1),  .AW(ADDR_W), .LAT(3), .INIT_ADDR(1'b0)) u_own (
    .clk, .rst_n, .req_valid(own_req_valid), .req_ready(own_req_ready),
    .req_write(own_req_write), .req_addr(own_req_addr), .req_wdata(own_req_wdata),
    .rsp_valid(own_rsp_valid), .rsp_data(own_rsp_data));
  pscratch_model #(.W(64), .AW(ADDR_W), .LAT(5), .INIT_ADDR(1'b1)) u_dat (
    .clk, .rst_n, .req_valid(dat_req_valid), .req_ready(dat_req_ready),
    .req_write(dat_req_write), .req_addr(dat_req_addr), .req_wdata(dat_req_wdata),
    .rsp_valid(dat_rsp_valid), .rsp_data(dat_rsp_data));

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // reference contents, written values only; the rest is the initial pattern
  data_t ref_m [int];
  function automatic data_t expect_of(input int a);
    return ref_m.exists(a) ? ref_m[a] : data_t'(64'(a) << 32);
  endfunction

  for (genvar g = 0; g < N; g++) begin : g_cl
    task automatic issue(input op_kind_e op, input int a, input data_t d);
      @(negedge clk);
      creq_valid[g] = 1; creq_op[g] = op; creq_addr[g] = ADDR_W'(a); creq_wdata[g] = d;
      #1; while (!creq_ready[g]) begin @(negedge clk); #1; end
      @(posedge clk); #1; creq_valid[g] = 0;
    endtask
    // one read, returns its latency in cycles
    task automatic rd_lat(input int a, output int lat);
      longint t0;
      issue(OP_READ, a, '0);
      t0 = cyc;
      while (!crsp_valid[g]) begin @(posedge clk); #1; end
      lat = int'(cyc - t0) + 1;
      check(crsp_data[g] == expect_of(a), $sformatf("client %0d read %0d", g, a));
    endtask
    task automatic wr(input int a, input data_t d);
      issue(OP_WRITE, a, d);
      ref_m[a] = d;
    endtask
    // pipelined stream: reads are issued back to back, responses counted
    task automatic stream(input bit write, input int base, output int cycles);
      longint t0;
      int got;
      t0 = cyc; got = 0;
      fork
        for (int i = 0; i < LEN; i++)
          if (write) wr(base + i, {32'(g), 32'(i)});
          else issue(OP_READ, base + i, '0);
        if (!write) while (got < LEN) begin
          @(posedge clk); #1;
          if (crsp_valid[g]) begin
            check(crsp_data[g] == expect_of(base + got), "stream read data");
            got++;
          end
        end
      join
      while (request_pending[g]) begin @(posedge clk); #1; end
      cycles = int'(cyc - t0);
    endtask
  end

  initial begin
    int l_hit, l_mem, l_remote, c;
    creq_valid = '0;
    for (int i = 0; i < N; i++) begin creq_op[i] = OP_READ; creq_addr[i] = '0; creq_wdata[i] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    // latency probes
    g_cl[0].rd_lat(100, l_mem);
    g_cl[0].rd_lat(100, l_hit);
    g_cl[1].wr(200, 64'h1234);
    repeat (20) @(posedge clk);
    g_cl[0].rd_lat(200, l_remote);
    $display("read latency: local hit %0d, next-level memory %0d, remote cache %0d cycles", l_hit, l_mem, l_remote);
    check(l_hit == 1, "local hit answers in one cycle");
    check(l_mem > l_hit && l_remote > l_hit, "misses cost more than hits");
    // throughput with 1, 2 and 3 clients streaming at once over their own
    // cold regions, then the 3-client case again with warm caches
    for (int k = 1; k <= N + 1; k++) begin
      int rc [N], wc [N], act, base;
      act = (k > N) ? N : k;
      base = (act - 1) * 1024;
      rc = '{default: 0}; wc = '{default: 0};
      fork
        g_cl[0].stream(1'b0, 4096 * 1 + base, rc[0]);
        if (act > 1) g_cl[1].stream(1'b0, 4096 * 2 + base, rc[1]);
        if (act > 2) g_cl[2].stream(1'b0, 4096 * 3 + base, rc[2]);
      join
      fork
        g_cl[0].stream(1'b1, 4096 * 1 + base + 512, wc[0]);
        if (act > 1) g_cl[1].stream(1'b1, 4096 * 2 + base + 512, wc[1]);
        if (act > 2) g_cl[2].stream(1'b1, 4096 * 3 + base + 512, wc[2]);
      join
      $display("%0d client(s), %s: %0d reads per client in %0d/%0d/%0d cycles, %0d writes in %0d/%0d/%0d cycles",
               act, k > N ? "warm" : "cold", LEN, rc[0], rc[1], rc[2], LEN, wc[0], wc[1], wc[2]);
      if (k == 1) c = rc[0];
      if (k == N) check(rc[0] >= c, "clients sharing the one controller stream no faster than one alone");
      if (k > N)  check(rc[0] <= LEN + 4 && wc[0] <= LEN + 4, "warm hits stream at one per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
