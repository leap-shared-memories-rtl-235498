// tb_wshr: directed test of the write-back status table.  Fills all entries,
// checks lookups, full/empty, that only the first forwarded requester is
// kept, and that freed entries are reused.
`timescale 1ns/1ps
module tb_wshr;
  import leap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  addr_t q_addr;
  logic q_hit, q_fwd_valid, full, alloc, set_fwd, free, empty;
  logic [2:0] q_idx;
  node_t q_src, q_fwd_src, alloc_src, fwd_src;
  wshr #(.ENTRIES(8), .IDX_W(3)) dut (.*);

  task automatic step(); @(posedge clk); #1; alloc = 0; set_fwd = 0; free = 0; endtask

  initial begin
    q_addr = 0; alloc = 0; set_fwd = 0; free = 0; alloc_src = 0; fwd_src = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(empty && !full, "empty after reset");
    for (int i = 0; i < 8; i++) begin
      q_addr = addr_t'(100 + i); #1;
      check(!q_hit, "no hit before alloc");
      alloc = 1; alloc_src = node_t'(i % 3);
      step();
    end
    check(full && !empty, "full after 8 allocations");
    for (int i = 0; i < 8; i++) begin
      q_addr = addr_t'(100 + i); #1;
      check(q_hit && q_src == node_t'(i % 3) && !q_fwd_valid, $sformatf("lookup %0d", i));
    end
    q_addr = 103; #1;
    set_fwd = 1; fwd_src = 5; step();
    set_fwd = 1; fwd_src = 6; step();      // a second requester is not kept
    check(q_hit && q_fwd_valid && q_fwd_src == 5, "first forwarded requester kept");
    q_addr = 104; #1;
    check(!q_fwd_valid, "other entry has no forward");
    free = 1; step();
    check(!q_hit && !full, "entry freed");
    q_addr = 200; #1;
    alloc = 1; alloc_src = 2; step();
    check(q_hit && q_src == 2 && !q_fwd_valid && full, "freed entry reused");
    for (int i = 0; i < 9; i++) begin
      q_addr = (i == 8) ? addr_t'(200) : addr_t'(100 + i); #1;
      if (q_hit) begin free = 1; step(); end
    end
    #1;
    check(empty, "all freed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
