// tb_barrier_node: eight barrier nodes on one ring, node 0 the master --
// the 1000-iteration, 8-thread barrier measurement.  The master sets a mask
// of all eight nodes; every node then runs 1000 rounds of: a little random
// work, barrierReached, wait for sync.  The bench checks that every slave
// is initialized by the INIT broadcast, that no node is released from round
// r before all eight nodes have arrived at round r, and that every node
// sees exactly 1000 releases.  It prints the average cycles per barrier and
// checks it against 17 cycles (7.35 million barriers per second at 125 MHz).
`timescale 1ns/1ps
module tb_barrier_node;
  localparam int N = 8, NW = 3, ROUNDS = 1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic          bv [N], br [N];
  logic [NW+1:0] bd [N];
  logic          initialized [N], set_ready [N], reached_valid [N], reached_ready [N], sync_valid [N];
  logic          set_valid;
  logic [N-1:0]  set_mask;

  for (genvar i = 0; i < N; i++) begin : g
    localparam int P = (i == 0) ? N - 1 : i - 1;
    barrier_node #(.N_NODES(N), .MY_ID(i), .IS_MASTER(i == 0), .MASTER_ID(0)) u (
      .clk, .rst_n,
      .in_valid(bv[P]), .in_data(bd[P]), .in_ready(br[P]),
      .out_valid(bv[i]), .out_data(bd[i]), .out_ready(br[i]),
      .initialized(initialized[i]),
      .set_valid((i == 0) ? set_valid : 1'b0), .set_mask(set_mask), .set_ready(set_ready[i]),
      .reached_valid(reached_valid[i]), .reached_ready(reached_ready[i]),
      .sync_valid(sync_valid[i]));
  end

  int arrived_total = 0;
  time t0;
  int round_of [N];
  int syncs [N];

  initial begin
    set_valid = 0; set_mask = '0;
    for (int i = 0; i < N; i++) begin reached_valid[i] = 0; syncs[i] = 0; round_of[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < N; i++) check(!initialized[i], "not initialized before setBarrier");
    @(negedge clk); set_valid = 1; set_mask = '1;
    #1; while (!set_ready[0]) begin @(negedge clk); #1; end
    @(posedge clk); #1; set_valid = 0;
    repeat (20) @(posedge clk);
    for (int i = 0; i < N; i++) check(initialized[i], "INIT reached every node");
    t0 = $time;
    for (int i = 0; i < N; i++) begin
      automatic int n = i;
      fork
        for (int r = 0; r < ROUNDS; r++) begin
          repeat ($urandom_range(3)) @(posedge clk);
          @(negedge clk); reached_valid[n] = 1;
          #1; while (!reached_ready[n]) begin @(negedge clk); #1; end
          @(posedge clk); #1; reached_valid[n] = 0;
          arrived_total++;
          while (!sync_valid[n]) begin @(posedge clk); #1; end
          check(arrived_total >= N * (r + 1), $sformatf("node %0d released early in round %0d", n, r));
          round_of[n] = r + 1;
        end
      join_none
    end
    wait fork;
    $display("%0d barriers on %0d nodes: %0d cycles per barrier", ROUNDS, N, int'(($time - t0) / 10) / ROUNDS);
    // 7,352,076 barriers per second at 125 MHz is 17 cycles per barrier
    check(int'(($time - t0) / 10) <= 17 * ROUNDS, "barrier rate of at least one per 17 cycles");
    repeat (20) @(posedge clk);
    for (int i = 0; i < N; i++) check(syncs[i] == ROUNDS, $sformatf("node %0d saw %0d releases", i, syncs[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) for (int i = 0; i < N; i++) if (sync_valid[i]) syncs[i]++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
