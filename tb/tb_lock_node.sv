// tb_lock_node: four lock nodes on their two rings, with two locks.
// Part 1 replays the situation of the lock example figure: node 2 and node 3
// ask for the same lock in the same cycle while node 0 owns it.  Node 3's
// request reaches the owner first and is granted; node 2's request is
// recorded by node 3, which hands the lock on when it releases.
// Part 2 is a random stress: every node acquires random locks, holds them
// for a random time and releases.  The bench checks that at most one node
// holds a lock at any time, that every acquire is granted, and that a
// grant always names the lock that was asked for.
`timescale 1ns/1ps
module tb_lock_node;
  localparam int N = 4, L = 2, LW = 1, NW = 2, MW = LW + NW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic          qv [N], qr [N], sv [N], sr [N];
  logic [MW-1:0] qd [N], sd [N];
  logic          acq_valid [N], acq_ready [N], grant_valid [N], rel_valid [N], rel_ready [N];
  logic [LW-1:0] acq_id [N], grant_id [N], rel_id [N];

  for (genvar i = 0; i < N; i++) begin : g
    localparam int P = (i == 0) ? N - 1 : i - 1;
    lock_node #(.N_NODES(N), .LOCK_NUM(L), .MY_ID(i), .IS_MASTER(i == 0)) u (
      .clk, .rst_n,
      .rq_in_valid(qv[P]), .rq_in_data(qd[P]), .rq_in_ready(qr[P]),
      .rq_out_valid(qv[i]), .rq_out_data(qd[i]), .rq_out_ready(qr[i]),
      .rs_in_valid(sv[P]), .rs_in_data(sd[P]), .rs_in_ready(sr[P]),
      .rs_out_valid(sv[i]), .rs_out_data(sd[i]), .rs_out_ready(sr[i]),
      .acq_valid(acq_valid[i]), .acq_id(acq_id[i]), .acq_ready(acq_ready[i]),
      .grant_valid(grant_valid[i]), .grant_id(grant_id[i]),
      .rel_valid(rel_valid[i]), .rel_id(rel_id[i]), .rel_ready(rel_ready[i]));
  end

  int holder [L];
  int grant_order [$];
  int grants = 0;

  task automatic do_acquire(input int n, input int l);
    @(negedge clk);
    acq_valid[n] = 1; acq_id[n] = LW'(l);
    #1; while (!acq_ready[n]) begin @(negedge clk); #1; end
    @(posedge clk); #1; acq_valid[n] = 0;
    while (!(grant_valid[n])) begin @(posedge clk); #1; end
    check(grant_id[n] == LW'(l), "grant names the requested lock");
    check(holder[l] == -1, $sformatf("lock %0d granted to %0d while held by %0d", l, n, holder[l]));
    holder[l] = n;
    grant_order.push_back(n);
    grants++;
  endtask
  task automatic do_release(input int n, input int l);
    @(negedge clk);
    holder[l] = -1;
    rel_valid[n] = 1; rel_id[n] = LW'(l);
    #1; while (!rel_ready[n]) begin @(negedge clk); #1; end
    @(posedge clk); #1; rel_valid[n] = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      acq_valid[i] = 0; acq_id[i] = '0; rel_valid[i] = 0; rel_id[i] = '0;
    end
    for (int l = 0; l < L; l++) holder[l] = -1;
    repeat (3) @(posedge clk); rst_n = 1;
    // part 1
    fork
      begin do_acquire(2, 0); do_release(2, 0); end
      begin do_acquire(3, 0); repeat (20) @(posedge clk); do_release(3, 0); end
    join
    check(grant_order.size() == 2 && grant_order[0] == 3 && grant_order[1] == 2,
          "node 3 first, node 2 second");
    check(g[3].u.fwv[0] == 1'b0 && g[2].u.st[0] == leap_pkg::LK_O, "lock left idle at node 2");
    // part 2
    for (int i = 0; i < N; i++) begin
      automatic int n = i;
      fork
        begin
          for (int k = 0; k < 150; k++) begin
            automatic int l;
            l = $urandom_range(L - 1);
            do_acquire(n, l);
            repeat ($urandom_range(6)) @(posedge clk);
            do_release(n, l);
            repeat ($urandom_range(4)) @(posedge clk);
          end
        end
      join_none
    end
    wait fork;
    check(grants == 2 + N * 150, "every acquire granted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: grants=%0d", grants);
    for (int l = 0; l < L; l++) $display("lock %0d: %0d%0d%0d%0d fw %0d%0d%0d%0d holder %0d", l, g[0].u.st[l], g[1].u.st[l], g[2].u.st[l], g[3].u.st[l], g[0].u.fwv[l], g[1].u.fwv[l], g[2].u.fwv[l], g[3].u.fwv[l], holder[l]);
    for (int i = 0; i < N; i++) $display("node %0d acq %0d id %0d q %0d s %0d", i, acq_valid[i], acq_id[i], qv[i], sv[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
