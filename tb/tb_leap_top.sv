// tb_leap_top: end-to-end test of the whole design at its default size
// (3 coherent clients with 1024-entry caches, 4 lock nodes sharing one lock,
// 2 barrier nodes).  Three workloads run at the same time:
//   * Coherence stress: 16 shared words that all fall into 4 cache sets, so
//     lines are evicted, written back, stolen and forwarded constantly.  Each
//     word has one writer (word k is written only by client k mod 3) that
//     writes an increasing counter; every client reads every word.  Checks:
//     the address tag of every value, a writer always reads its own latest
//     write, no reader ever sees a word's counter go backwards, and no value
//     is newer than the last write issued.  After quiescence every client
//     reads every word and must see its final value.
//   * Shared queue: two producers (lock nodes 0, 1) and two consumers (nodes
//     2, 3) share a 64-entry queue guarded by the lock; each producer inserts
//     1024 items.  Checks mutual exclusion, FIFO order and that every item
//     arrives exactly once.
//   * Barrier: the two barrier nodes run 1000 rounds; no node may be released
//     before both have arrived.
// Each protocol mechanism is counted and must occur at least once.
`timescale 1ns/1ps
module tb_leap_top;
  import leap_pkg::*;

  localparam int N      = 3;
  localparam int NADDR  = 16;
  localparam int OPS    = 3000;
  localparam int ITEMS  = 1024;
  localparam int QSIZE  = 64;
  localparam int ROUNDS = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- DUT ----------------
  logic [N-1:0] creq_valid, creq_ready, crsp_valid, request_pending;
  op_kind_e     creq_op [N];
  logic [ADDR_W-1:0] creq_addr [N];
  data_t        creq_wdata [N], crsp_data [N];
  logic own_req_valid, own_req_ready, own_req_write, own_req_wdata, own_rsp_valid, own_rsp_data;
  logic dat_req_valid, dat_req_ready, dat_req_write, dat_rsp_valid, ctrl_idle;
  addr_t own_req_addr, dat_req_addr;
  data_t dat_req_wdata, dat_rsp_data;
  logic [3:0] acq_valid, acq_ready, grant_valid, rel_valid, rel_ready;
  logic [0:0] acq_id [4], grant_id [4], rel_id [4];
  logic [1:0] bar_init, bar_reached_valid, bar_reached_ready, bar_sync;
  logic       bar_set_valid, bar_set_ready;

  leap_top dut (
    .clk, .rst_n,
    .creq_valid, .creq_ready, .creq_op, .creq_addr, .creq_wdata,
    .crsp_valid, .crsp_data, .request_pending,
    .own_req_valid, .own_req_ready, .own_req_write, .own_req_addr, .own_req_wdata,
    .own_rsp_valid, .own_rsp_data,
    .dat_req_valid, .dat_req_ready, .dat_req_write, .dat_req_addr, .dat_req_wdata,
    .dat_rsp_valid, .dat_rsp_data, .ctrl_idle,
    .acq_valid, .acq_id, .acq_ready, .grant_valid, .grant_id,
    .rel_valid, .rel_id, .rel_ready,
    .bar_initialized(bar_init), .bar_set_valid, .bar_set_mask(2'b11), .bar_set_ready,
    .bar_reached_valid, .bar_reached_ready, .bar_sync_valid(bar_sync)
  );

  pscratch_model #(.W(1),  .AW(ADDR_W), .LAT(3), .INIT_ADDR(1'b0)) u_own (
    .clk, .rst_n, .req_valid(own_req_valid), .req_ready(own_req_ready),
    .req_write(own_req_write), .req_addr(own_req_addr), .req_wdata(own_req_wdata),
    .rsp_valid(own_rsp_valid), .rsp_data(own_rsp_data));
  pscratch_model #(.W(64), .AW(ADDR_W), .LAT(5), .INIT_ADDR(1'b1)) u_dat (
    .clk, .rst_n, .req_valid(dat_req_valid), .req_ready(dat_req_ready),
    .req_write(dat_req_write), .req_addr(dat_req_addr), .req_wdata(dat_req_wdata),
    .rsp_valid(dat_rsp_valid), .rsp_data(dat_rsp_data));

  // ---------------- coherence workload ----------------
  function automatic logic [ADDR_W-1:0] waddr(input int k);
    return ADDR_W'((k % 4) + (k / 4) * 1024 + 7 * 4096 * (k / 8));
  endfunction

  int wr_cnt [NADDR];
  int last_seen [N][NADDR];
  int done_clients = 0;
  bit final_phase = 0;

  for (genvar g = 0; g < N; g++) begin : g_drv
    int pend_k [$];
    int pend_exp [$];     // expected counter for the writer's own reads, -1 otherwise

    task automatic issue(input op_kind_e op, input logic [ADDR_W-1:0] a, input data_t d);
      @(negedge clk);
      creq_valid[g] = 1'b1;
      creq_op[g]    = op;
      creq_addr[g]  = a;
      creq_wdata[g] = d;
      #1;
      while (!creq_ready[g]) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      #1;
      creq_valid[g] = 1'b0;
    endtask

    initial begin
      creq_valid[g] = 1'b0;
      creq_op[g] = OP_READ; creq_addr[g] = '0; creq_wdata[g] = '0;
      for (int k = 0; k < NADDR; k++) last_seen[g][k] = 0;
      wait (rst_n);
      repeat (5) @(posedge clk);
      for (int n = 0; n < OPS; n++) begin
        int k, r;
        // half of the accesses go to two words that share a cache set
        k = ($urandom_range(1) == 0) ? (($urandom_range(1) == 0) ? 0 : 4)
                                     : $urandom_range(NADDR - 1);
        r = $urandom_range(99);
        if (r < 3) begin
          issue(OP_FENCE_FULL, '0, '0);
        end else if (k % N == g && r < 45) begin
          wr_cnt[k]++;
          issue(OP_WRITE, waddr(k), {32'(waddr(k)), 32'(wr_cnt[k])});
        end else begin
          pend_k.push_back(k);
          pend_exp.push_back((k % N == g) ? wr_cnt[k] : -1);
          issue(OP_READ, waddr(k), '0);
        end
        if ($urandom_range(3) == 0) repeat ($urandom_range(6)) @(posedge clk);
      end
      wait (pend_k.size() == 0);
      done_clients++;
      wait (final_phase);
      for (int k = 0; k < NADDR; k++) begin
        pend_k.push_back(k);
        pend_exp.push_back(wr_cnt[k]);
        issue(OP_READ, waddr(k), '0);
      end
      wait (pend_k.size() == 0);
      done_clients++;
    end

    always @(negedge clk) begin
      if (rst_n && crsp_valid[g]) begin
        int k, e, c;
        if (pend_k.size() == 0) begin
          check(0, $sformatf("client %0d: unexpected response", g));
        end else begin
          k = pend_k.pop_front();
          e = pend_exp.pop_front();
          c = int'(crsp_data[g][31:0]);
          check(crsp_data[g][63:32] == 32'(waddr(k)),
                $sformatf("client %0d word %0d: address tag %h", g, k, crsp_data[g][63:32]));
          check(c >= last_seen[g][k],
                $sformatf("client %0d word %0d: counter went back %0d -> %0d", g, k, last_seen[g][k], c));
          check(c <= wr_cnt[k],
                $sformatf("client %0d word %0d: counter %0d newer than last write %0d", g, k, c, wr_cnt[k]));
          if (e >= 0)
            check(c == e, $sformatf("client %0d word %0d: expected %0d got %0d", g, k, e, c));
          last_seen[g][k] = c;
        end
      end
    end
  end

  // ---------------- shared queue under the lock ----------------
  int queue_q [$];
  int holders = 0, produced = 0, consumed = 0;
  int next_item [2];
  int last_from [2];
  bit queue_done = 0;

  for (genvar g = 0; g < 4; g++) begin : g_lk
    initial begin
      acq_valid[g] = 1'b0; rel_valid[g] = 1'b0; acq_id[g] = '0; rel_id[g] = '0;
      wait (rst_n);
      repeat (3) @(posedge clk);
      forever begin
        if (g < 2 && next_item[g] >= ITEMS) break;
        if (g >= 2 && consumed >= 2 * ITEMS) break;
        @(negedge clk);
        acq_valid[g] = 1'b1;
        #1;
        while (!acq_ready[g]) begin @(negedge clk); #1; end
        @(posedge clk); #1;
        acq_valid[g] = 1'b0;
        while (!grant_valid[g]) begin @(negedge clk); end
        holders++;
        check(holders == 1, $sformatf("lock node %0d: %0d holders", g, holders));
        repeat ($urandom_range(3)) @(posedge clk);
        if (g < 2) begin
          if (queue_q.size() < QSIZE && next_item[g] < ITEMS) begin
            queue_q.push_back(g * 65536 + next_item[g]);
            next_item[g]++;
            produced++;
          end
        end else if (queue_q.size() > 0) begin
          int v, p;
          v = queue_q.pop_front();
          p = v / 65536;
          check(v % 65536 == last_from[p] + 1, $sformatf("queue order: producer %0d item %0d", p, v % 65536));
          last_from[p] = v % 65536;
          consumed++;
        end
        holders--;
        @(negedge clk);
        rel_valid[g] = 1'b1;
        #1;
        while (!rel_ready[g]) begin @(negedge clk); #1; end
        @(posedge clk); #1;
        rel_valid[g] = 1'b0;
      end
    end
  end

  // ---------------- barrier rounds ----------------
  int arrived [2];
  int synced [2];
  bit bar_done = 0;
  initial begin
    bar_set_valid = 1'b0;
    wait (rst_n);
    @(negedge clk);
    bar_set_valid = 1'b1;
    #1;
    while (!bar_set_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    bar_set_valid = 1'b0;
  end
  for (genvar g = 0; g < 2; g++) begin : g_bar
    initial begin
      bar_reached_valid[g] = 1'b0;
      wait (rst_n);
      wait (bar_init[g]);
      for (int r = 0; r < ROUNDS; r++) begin
        repeat ($urandom_range(4)) @(posedge clk);
        @(negedge clk);
        bar_reached_valid[g] = 1'b1;
        #1;
        while (!bar_reached_ready[g]) begin @(negedge clk); #1; end
        @(posedge clk); #1;
        bar_reached_valid[g] = 1'b0;
        arrived[g]++;
        while (!bar_sync[g]) @(negedge clk);
        check(arrived[0] == r + 1 && arrived[1] == r + 1,
              $sformatf("barrier node %0d released early in round %0d", g, r));
        synced[g]++;
        @(negedge clk);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_mem_grant, n_c2c, n_wb_dirty, n_wb_clean, n_wb_cancel, n_wshr_fwd_served;
  int n_mshr_fwd, n_wshr_fwd, n_upgrade_local, n_putm_inval, n_lock_fwd;
  int n_lock_record, n_lock_direct, n_bar_done, n_fence;
  int n_c2c_c [N], n_mshr_fwd_c [N], n_upgrade_c [N], n_putm_c [N];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.rq_push && !dut.u_ctrl.wb_pop) n_mem_grant++;
    if (dut.u_ctrl.rq_push &&  dut.u_ctrl.wb_pop) n_wshr_fwd_served++;
    if (dut.u_ctrl.wb_pop && dut.u_ctrl.wb_head.kind == RSP_WB &&  dut.u_ctrl.wb_head.dirty) n_wb_dirty++;
    if (dut.u_ctrl.wb_pop && dut.u_ctrl.wb_head.kind == RSP_WB && !dut.u_ctrl.wb_head.dirty) n_wb_clean++;
    if (dut.u_ctrl.wb_pop && dut.u_ctrl.wb_head.kind == RSP_WBCANCEL) n_wb_cancel++;
    if (dut.u_ctrl.w_set_fwd) n_wshr_fwd++;
    if (dut.g_bar[0].u_bar.complete && dut.g_bar[0].u_bar.inj_ready) n_bar_done++;
  end
  for (genvar g = 0; g < N; g++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      if (dut.g_client[g].u_client.u_router.u_ct.rq_push &&
          dut.g_client[g].u_client.u_router.u_ct.cmp_kind == RSP_DATA) n_c2c_c[g]++;
      if (dut.g_client[g].u_client.u_cache.fwd_push)       n_mshr_fwd_c[g]++;
      if (dut.g_client[g].u_client.u_cache.miss_set_local) n_upgrade_c[g]++;
      if (dut.g_client[g].u_client.u_cache.miss_set_putm)  n_putm_c[g]++;
      if (creq_valid[g] && creq_ready[g] && creq_op[g] == OP_FENCE_FULL) n_fence++;
    end
  end
  for (genvar g = 0; g < 4; g++) begin : g_lcnt
    always @(posedge clk) if (rst_n) begin
      if (3'(dut.g_lock[g].u_lock.act) == 3'd2) n_lock_fwd++;      // A_FWD
      if (3'(dut.g_lock[g].u_lock.act) == 3'd3) begin             // A_REQ
        if (dut.g_lock[g].u_lock.st[0] == LK_O) n_lock_direct++;
        else n_lock_record++;
      end
    end
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------- sequencing ----------------
  initial begin
    int t0;
    for (int k = 0; k < NADDR; k++) wr_cnt[k] = 0;
    next_item[0] = 0; next_item[1] = 0; last_from[0] = -1; last_from[1] = -1;
    arrived[0] = 0; arrived[1] = 0; synced[0] = 0; synced[1] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    t0 = 0;
    wait (done_clients == N);
    // quiesce, then the final agreement pass
    repeat (50) @(posedge clk);
    wait (request_pending == '0 && ctrl_idle);
    final_phase = 1;
    wait (done_clients == 2 * N);
    wait (consumed == 2 * ITEMS && synced[0] == ROUNDS && synced[1] == ROUNDS);
    repeat (20) @(posedge clk);
    for (int g = 0; g < N; g++) begin
      n_c2c += n_c2c_c[g]; n_mshr_fwd += n_mshr_fwd_c[g];
      n_upgrade_local += n_upgrade_c[g]; n_putm_inval += n_putm_c[g];
    end
    check(produced == 2 * ITEMS, $sformatf("produced %0d", produced));
    check(consumed == 2 * ITEMS, $sformatf("consumed %0d", consumed));
    check(queue_q.size() == 0, "queue not empty");
    check(synced[0] == ROUNDS && synced[1] == ROUNDS, "barrier rounds");
    check(n_bar_done == ROUNDS, $sformatf("barrier completions %0d", n_bar_done));
    $display("mechanisms: mem_grant=%0d c2c=%0d wb_dirty=%0d wb_clean=%0d wb_cancel=%0d wshr_fwd=%0d wshr_fwd_served=%0d",
             n_mem_grant, n_c2c, n_wb_dirty, n_wb_clean, n_wb_cancel, n_wshr_fwd, n_wshr_fwd_served);
    $display("mechanisms: mshr_fwd=%0d upgrade_local=%0d putm_after_miss=%0d fence=%0d lock_fwd=%0d lock_record=%0d lock_direct=%0d barrier=%0d",
             n_mshr_fwd, n_upgrade_local, n_putm_inval, n_fence, n_lock_fwd, n_lock_record, n_lock_direct, n_bar_done);
    check(n_mem_grant > 0, "no grant from memory");
    check(n_c2c > 0, "no cache-to-cache transfer");
    check(n_wb_dirty > 0, "no dirty write-back");
    check(n_wb_clean > 0, "no clean write-back");
    check(n_wb_cancel > 0, "no cancelled write-back");
    check(n_wshr_fwd > 0, "no request forwarded by the WSHR");
    check(n_wshr_fwd_served > 0, "no WSHR-forwarded request served");
    check(n_mshr_fwd > 0, "no snoop on an MSHR forwarding list");
    check(n_upgrade_local > 0, "no O->M upgrade without data");
    check(n_fence > 0, "no fence");
    check(n_lock_fwd > 0, "no lock passed through a forwarding id");
    check(n_lock_record > 0, "no lock request recorded");
    check(n_lock_direct > 0, "no lock granted by an idle owner");
    $display("cycles: %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog: done_clients=%0d consumed=%0d synced=%0d/%0d", done_clients, consumed, synced[0], synced[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
