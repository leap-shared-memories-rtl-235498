// tb_coh_cache: one coherent cache (8 lines, 4 write-back ways) against a
// reactive model of the rest of the system.  The bench plays the ordering
// point and the other caches:
//   * requests the cache sends are queued and later presented back to it as
//     activated snoops, interleaved with foreign GETS/GETM from node 1,
//     half of them aimed at the address the cache is working on, so foreign
//     requests land both before and after the cache's own request;
//   * when the cache's own GET is activated and the cache does not own the
//     line, data follows after a random delay; GETS data is randomly
//     exclusive (memory granting M) or shared (another cache supplying);
//   * completions are checked: data sent for a foreign request must be the
//     current value, a write-back must carry the current value, a cancel
//     must come exactly when a foreign GETM took the line first, and only
//     the owner may send data.  A foreign GETM then writes a new value.
// Local reads and byte-masked writes are checked against a reference value
// per address, applied in the global order: a hit takes effect when it is
// accepted, a miss when its request is activated.
`timescale 1ns/1ps
module tb_coh_cache;
  import leap_pkg::*;
  localparam int ENT = 8, NA = 32, OPS = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic lreq_valid, lreq_ready, lrsp_valid, busy, ureq_valid, ureq_ready;
  op_kind_e lreq_op;
  addr_t lreq_addr;
  data_t lreq_wdata, lrsp_data, cmp_data;
  logic [7:0] lreq_wmask;
  coh_req_t ureq_data, snp_req;
  logic snp_valid, snp_ready, cmp_valid, cmp_send, cmp_dirty, cmp_ready, drsp_valid;
  logic [2:0] snp_idx, cmp_idx;
  rsp_kind_e cmp_kind;
  coh_rsp_t drsp;

  coh_cache #(.MY_ID(0), .ENTRIES(ENT), .WB_SETS(4), .CT_IDX_W(3), .FWD_DEPTH(4)) dut (.*);

  data_t golden [NA], mem [NA];
  bit    owner [NA];
  coh_req_t actq [$];
  coh_req_t ct [8];
  bit ct_used [8];
  bit presenting;
  // data responses waiting: address and due cycle
  int    dq_addr [$], dq_due [$];
  longint cyc = 0;
  // the local operation in flight
  bit    op_busy, op_write, op_seen_edge, op_miss, op_expect_set;
  addr_t op_addr;
  data_t op_wdata, op_expect;
  logic [7:0] op_mask;
  int ops_done = 0, n_fwd_getm = 0, n_cancel = 0, n_local = 0;

  function automatic data_t merge(input data_t o, input data_t n, input logic [7:0] m);
    for (int b = 0; b < 8; b++) if (m[b]) o[b*8 +: 8] = n[b*8 +: 8];
    return o;
  endfunction

  task automatic apply_local();
    if (op_write) golden[op_addr] = merge(golden[op_addr], op_wdata, op_mask);
    else begin op_expect = golden[op_addr]; op_expect_set = 1; end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // first edge after the local request was accepted: hit or miss
    if (op_busy && op_seen_edge == 0 && !lreq_valid) begin
      op_seen_edge = 1;
      op_miss = busy;
      if (!busy) begin
        apply_local();
        if (op_write) op_busy = 0;
      end
    end
    if (ureq_valid && ureq_ready) actq.push_back(ureq_data);
    if (snp_valid && snp_ready) begin
      check(!ct_used[snp_idx], "index reused");
      ct[snp_idx] = snp_req; ct_used[snp_idx] = 1; presenting = 0;
    end
    if (cmp_valid && cmp_ready) begin
      automatic coh_req_t r = ct[cmp_idx];
      automatic int a = int'(r.addr);
      check(ct_used[cmp_idx], "completion of an unused index");
      ct_used[cmp_idx] = 0;
      if (r.src == 0) begin
        if (r.kind == REQ_PUTM) begin
          check(cmp_send, "own PUTM always answers");
          check((cmp_kind == RSP_WB) == owner[a], $sformatf("WB/cancel matches ownership of %0d", a));
          if (cmp_kind == RSP_WB) begin
            if (cmp_dirty) begin
              check(cmp_data == golden[a], $sformatf("write-back value of %0d", a));
              mem[a] = cmp_data;
            end else check(mem[a] == golden[a], "clean write-back only when memory is current");
          end else n_cancel++;
          owner[a] = 0;
        end else begin
          check(!cmp_send, "own GET sends nothing");
          check(op_busy && op_miss && a == int'(op_addr), "own GET is for the current miss");
          apply_local();
          if (owner[a]) n_local++;
          else begin dq_addr.push_back(a); dq_due.push_back(int'(cyc) + $urandom_range(4)); end
        end
      end else begin
        check(cmp_send == owner[a], $sformatf("only the owner answers %0d", a));
        if (cmp_send) check(cmp_kind == RSP_DATA && cmp_data == golden[a], $sformatf("foreign data for %0d", a));
        if (r.kind == REQ_GETM) begin
          automatic data_t v = {$urandom, $urandom};
          if (op_busy && op_miss && a == int'(op_addr) && op_seen_edge) n_fwd_getm++;
          owner[a] = 0; golden[a] = v; mem[a] = v;
        end
      end
    end
    if (lrsp_valid) begin
      check(op_busy && !op_write && op_expect_set && lrsp_data == op_expect,
            $sformatf("read of %0d: got %h want %h", op_addr, lrsp_data, op_expect));
      op_busy = 0;
    end
    if (op_busy && op_write && op_miss && !busy && op_seen_edge) op_busy = 0;
    if (lreq_valid && lreq_ready) begin
      op_busy = 1; op_seen_edge = 0; op_expect_set = 0;
      op_write = (lreq_op == OP_WRITE); op_addr = lreq_addr; op_wdata = lreq_wdata; op_mask = lreq_wmask;
      ops_done++;
    end
  end

  // drive inputs between edges
  always @(negedge clk) begin
    drsp_valid = 0;
    if (rst_n) begin
      cmp_ready  = ($urandom_range(9) != 0);
      ureq_ready = ($urandom_range(5) != 0);
      if (dq_addr.size() != 0 && int'(cyc) >= dq_due[0]) begin
        automatic int a = dq_addr.pop_front();
        automatic bit ex;
        void'(dq_due.pop_front());
        ex = (op_write || $urandom_range(1) == 1);
        drsp_valid = 1;
        drsp = '{kind: RSP_DATA, dest: 4'd0, src: 4'd3, addr: addr_t'(a), excl: ex, dirty: 1'b0, data: mem[a]};
        owner[a] = ex;
      end
      if (!presenting) begin
        automatic int fi = -1;
        for (int i = 7; i >= 0; i--) if (!ct_used[i]) fi = i;
        if (fi >= 0) begin
          if (actq.size() != 0 && $urandom_range(2) != 0) begin
            snp_req = actq.pop_front(); snp_idx = 3'(fi); presenting = 1;
          end else if ($urandom_range(3) == 0) begin
            automatic int a = ($urandom_range(1) == 1 && op_busy) ? int'(op_addr) : $urandom_range(NA - 1);
            snp_req = '{kind: ($urandom_range(1) == 1) ? REQ_GETM : REQ_GETS, src: 4'd1, addr: addr_t'(a)};
            snp_idx = 3'(fi); presenting = 1;
          end
        end
      end
      snp_valid = presenting;
      if (!lreq_valid && !op_busy && ops_done < OPS) begin
        lreq_valid = 1;
        lreq_op    = ($urandom_range(1) == 1) ? OP_WRITE : OP_READ;
        lreq_addr  = addr_t'($urandom_range(NA - 1));
        lreq_wdata = {$urandom, $urandom};
        lreq_wmask = 8'($urandom_range(255)) | 8'h01;
      end else if (lreq_valid && op_busy) lreq_valid = 0;
    end
  end

  initial begin
    lreq_valid = 0; lreq_op = OP_READ; lreq_addr = '0; lreq_wdata = '0; lreq_wmask = '0;
    ureq_ready = 1; snp_valid = 0; snp_req = '0; snp_idx = '0; cmp_ready = 1; drsp_valid = 0; drsp = '0;
    presenting = 0; op_busy = 0;
    for (int a = 0; a < NA; a++) begin golden[a] = 64'(a) * 1000; mem[a] = golden[a]; owner[a] = 0; end
    for (int i = 0; i < 8; i++) ct_used[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (ops_done == OPS && !op_busy);
    repeat (200) @(posedge clk);
    check(actq.size() == 0 && !busy, "quiet at the end");
    $display("own-line upgrades %0d, cancels %0d, foreign GETM after own miss %0d", n_local, n_cancel, n_fwd_getm);
    check(n_local > 0 && n_cancel > 0 && n_fwd_getm > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
