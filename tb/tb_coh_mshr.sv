// tb_coh_mshr: directed test of the miss status handling registers:
// write-back way allocation per set, lookup by address, loss of ownership,
// release; the miss way's flags and response capture; the forwarding list
// order.
`timescale 1ns/1ps
module tb_coh_mshr;
  import leap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  addr_t wb_alloc_addr, wb_q_addr, miss_alloc_addr, miss_addr;
  logic wb_alloc_busy, wb_alloc, wb_alloc_dirty, wb_q_hit, wb_q_owner, wb_q_dirty, wb_clear_owner, wb_free;
  data_t wb_alloc_data, wb_q_data, miss_rsp_data, miss_data;
  logic miss_alloc, miss_alloc_write, miss_set_active, miss_set_local, miss_set_data, miss_rsp_excl;
  logic miss_set_putm, miss_free, miss_valid, miss_write, miss_active, miss_local, miss_got_data, miss_excl, miss_putm;
  logic fwd_push, fwd_pop, fwd_empty, fwd_full;
  logic [4:0] fwd_push_data, fwd_head;

  coh_mshr #(.WB_SETS(32), .FWD_DEPTH(4), .FWD_W(5)) dut (.*);

  task automatic step();
    @(posedge clk); #1;
    wb_alloc = 0; wb_clear_owner = 0; wb_free = 0; miss_alloc = 0; miss_set_active = 0;
    miss_set_local = 0; miss_set_data = 0; miss_set_putm = 0; miss_free = 0; fwd_push = 0; fwd_pop = 0;
  endtask

  initial begin
    wb_alloc_addr = 0; wb_q_addr = 0; miss_alloc_addr = 0; wb_alloc_data = 0; wb_alloc_dirty = 0;
    miss_rsp_data = 0; miss_rsp_excl = 0; miss_alloc_write = 0; fwd_push_data = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    step();
    // write-backs into sets 3 and 4
    wb_alloc_addr = 14'h1403; #1;
    check(!wb_alloc_busy, "set 3 free");
    wb_alloc = 1; wb_alloc_data = 64'hAAAA; wb_alloc_dirty = 1; step();
    wb_alloc_addr = 14'h0004; wb_alloc = 1; wb_alloc_data = 64'hBBBB; wb_alloc_dirty = 0; step();
    wb_alloc_addr = 14'h0023; #1;        // also set 3
    check(wb_alloc_busy, "set 3 busy");
    wb_q_addr = 14'h1403; #1;
    check(wb_q_hit && wb_q_owner && wb_q_dirty && wb_q_data == 64'hAAAA, "lookup set 3");
    wb_q_addr = 14'h0023; #1;
    check(!wb_q_hit, "same set, other address misses");
    wb_q_addr = 14'h0004; #1;
    check(wb_q_hit && wb_q_owner && !wb_q_dirty && wb_q_data == 64'hBBBB, "lookup set 4");
    wb_clear_owner = 1; step();
    check(wb_q_hit && !wb_q_owner, "ownership lost");
    wb_free = 1; step();
    check(!wb_q_hit, "freed");
    wb_q_addr = 14'h1403; #1;
    check(wb_q_hit && wb_q_owner, "set 3 untouched");
    // miss way
    miss_alloc = 1; miss_alloc_addr = 14'h0777; miss_alloc_write = 1; step();
    check(miss_valid && miss_write && !miss_active && !miss_got_data && miss_addr == 14'h0777, "miss allocated");
    miss_set_data = 1; miss_rsp_data = 64'h1234; miss_rsp_excl = 1; step();
    check(miss_got_data && miss_data == 64'h1234 && miss_excl && !miss_active, "data before activation");
    miss_set_active = 1; miss_set_putm = 1; step();
    check(miss_active && miss_putm && !miss_local, "activated");
    // forwarding list keeps order
    for (int i = 0; i < 4; i++) begin fwd_push = 1; fwd_push_data = 5'(i * 3 + 1); step(); end
    check(fwd_full, "list full");
    for (int i = 0; i < 4; i++) begin
      check(!fwd_empty && fwd_head == 5'(i * 3 + 1), $sformatf("forward %0d in order", i));
      fwd_pop = 1; step();
    end
    check(fwd_empty, "list empty");
    miss_free = 1; step();
    check(!miss_valid, "miss freed");
    miss_alloc = 1; miss_alloc_addr = 14'h0100; miss_alloc_write = 0; step();
    check(miss_valid && !miss_write && !miss_got_data && !miss_putm && !miss_active, "flags cleared on reuse");
    miss_set_local = 1; step();
    check(miss_local, "local upgrade flag");
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
