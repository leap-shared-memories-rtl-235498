// tb_coh_controller: the controller alone, with the rings opened up.  The
// test bench injects unactivated requests and write-back messages and
// watches the activated broadcasts and the responses.  Scenarios:
//   1. GETS to a line owned by memory -> data with excl, owner bit set.
//   2. GETM to a line a cache owns -> activated, memory stays silent.
//   3. PUTM, then a GETS ordered after it, then the dirty write-back ->
//      the waiting requester receives the written-back data, memory updated.
//   4. PUTM then WBCANCEL -> nothing sent, owner bit unchanged.
//   5. Clean write-back -> owner bit cleared, data store untouched.
//   6. A write-back that overtakes its PUTM is still matched.
//   7. A response for a client passes through unchanged.
`timescale 1ns/1ps
module tb_coh_controller;
  import leap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic ur_in_valid, ur_in_ready, ur_out_valid, ar_in_valid, ar_in_ready, ar_out_valid;
  logic rr_in_valid, rr_in_ready, rr_out_valid;
  coh_req_t ur_in_data, ur_out_data, ar_in_data, ar_out_data;
  coh_rsp_t rr_in_data, rr_out_data;
  logic own_req_valid, own_req_ready, own_req_write, own_req_wdata, own_rsp_valid, own_rsp_data;
  logic dat_req_valid, dat_req_ready, dat_req_write, dat_rsp_valid, idle;
  addr_t own_req_addr, dat_req_addr;
  data_t dat_req_wdata, dat_rsp_data;

  coh_controller #(.CTRL_ID(3)) dut (
    .clk, .rst_n,
    .ur_in_valid, .ur_in_data, .ur_in_ready, .ur_out_valid, .ur_out_data, .ur_out_ready(1'b1),
    .ar_in_valid, .ar_in_data, .ar_in_ready, .ar_out_valid, .ar_out_data, .ar_out_ready(1'b1),
    .rr_in_valid, .rr_in_data, .rr_in_ready, .rr_out_valid, .rr_out_data, .rr_out_ready(1'b1),
    .own_req_valid, .own_req_ready, .own_req_write, .own_req_addr, .own_req_wdata,
    .own_rsp_valid, .own_rsp_data,
    .dat_req_valid, .dat_req_ready, .dat_req_write, .dat_req_addr, .dat_req_wdata,
    .dat_rsp_valid, .dat_rsp_data, .idle
  );
  pscratch_model #(.W(1),  .AW(ADDR_W), .LAT(3), .INIT_ADDR(1'b0)) u_own (
    .clk, .rst_n, .req_valid(own_req_valid), .req_ready(own_req_ready),
    .req_write(own_req_write), .req_addr(own_req_addr), .req_wdata(own_req_wdata),
    .rsp_valid(own_rsp_valid), .rsp_data(own_rsp_data));
  pscratch_model #(.W(64), .AW(ADDR_W), .LAT(5), .INIT_ADDR(1'b1)) u_dat (
    .clk, .rst_n, .req_valid(dat_req_valid), .req_ready(dat_req_ready),
    .req_write(dat_req_write), .req_addr(dat_req_addr), .req_wdata(dat_req_wdata),
    .rsp_valid(dat_rsp_valid), .rsp_data(dat_rsp_data));

  coh_req_t act_log [$];
  coh_rsp_t rsp_log [$];
  always @(negedge clk) if (rst_n) begin
    if (ar_out_valid) act_log.push_back(ar_out_data);
    if (rr_out_valid) rsp_log.push_back(rr_out_data);
    check(!ur_out_valid, "nothing leaves on the unactivated ring");
  end

  task automatic send_req(input req_kind_e k, input int src, input addr_t a);
    @(negedge clk);
    ur_in_valid = 1; ur_in_data = '{kind: k, src: node_t'(src), addr: a};
    #1; while (!ur_in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1; ur_in_valid = 0;
  endtask
  task automatic send_rsp(input rsp_kind_e k, input int src, input int dst, input addr_t a,
                          input logic dirty, input data_t d);
    @(negedge clk);
    rr_in_valid = 1;
    rr_in_data = '{kind: k, dest: node_t'(dst), src: node_t'(src), addr: a, excl: 1'b0, dirty: dirty, data: d};
    #1; while (!rr_in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1; rr_in_valid = 0;
  endtask
  task automatic settle(); repeat (40) @(posedge clk); endtask
  function automatic data_t init_val(input addr_t a); return data_t'(64'(a) << 32); endfunction

  initial begin
    ur_in_valid = 0; ur_in_data = '0; ar_in_valid = 0; ar_in_data = '0; rr_in_valid = 0; rr_in_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1
    send_req(REQ_GETS, 0, 14'h0010); settle();
    check(act_log.size() == 1 && act_log[0] == '{kind: REQ_GETS, src: 4'd0, addr: 14'h0010}, "GETS activated");
    check(rsp_log.size() == 1 && rsp_log[0].kind == RSP_DATA && rsp_log[0].dest == 0 && rsp_log[0].excl &&
          rsp_log[0].data == init_val(14'h0010) && rsp_log[0].addr == 14'h0010, "memory grants M with data");
    check(u_own.mem[14'h0010] == 1'b1, "owner bit set");
    act_log.delete(); rsp_log.delete();
    // 2
    send_req(REQ_GETM, 1, 14'h0010); settle();
    check(act_log.size() == 1 && act_log[0].kind == REQ_GETM && act_log[0].src == 1, "GETM activated");
    check(rsp_log.size() == 0, "memory silent when a cache owns the line");
    act_log.delete();
    // 3
    send_req(REQ_PUTM, 1, 14'h0010);
    send_req(REQ_GETS, 2, 14'h0010); settle();
    check(act_log.size() == 2 && act_log[0].kind == REQ_PUTM && act_log[1].src == 2, "order kept");
    check(rsp_log.size() == 0, "reader waits for the write-back");
    send_rsp(RSP_WB, 1, 3, 14'h0010, 1'b1, 64'hDEAD_BEEF_0000_0001); settle();
    check(rsp_log.size() == 1 && rsp_log[0].dest == 2 && rsp_log[0].excl &&
          rsp_log[0].data == 64'hDEAD_BEEF_0000_0001, "forwarded requester gets the write-back data");
    check(u_dat.mem[14'h0010] == 64'hDEAD_BEEF_0000_0001, "dirty data written");
    check(u_own.mem[14'h0010] == 1'b1, "line handed to the reader");
    act_log.delete(); rsp_log.delete();
    // 4
    send_req(REQ_PUTM, 2, 14'h0010); settle();
    send_rsp(RSP_WBCANCEL, 2, 3, 14'h0010, 1'b0, '0); settle();
    check(rsp_log.size() == 0 && u_own.mem[14'h0010] == 1'b1 && dut.w_empty, "cancel frees the entry only");
    // 5
    send_req(REQ_PUTM, 2, 14'h0010); settle();
    send_rsp(RSP_WB, 2, 3, 14'h0010, 1'b0, 64'h5555); settle();
    check(u_own.mem[14'h0010] == 1'b0 && u_dat.mem[14'h0010] == 64'hDEAD_BEEF_0000_0001 && dut.w_empty,
          "clean write-back returns ownership only");
    act_log.delete(); rsp_log.delete();
    // 6: owner-bit reads keep the controller busy while a PUTM and its WB arrive
    send_req(REQ_GETS, 0, 14'h0020);
    send_req(REQ_GETS, 1, 14'h0030);
    fork
      send_req(REQ_PUTM, 0, 14'h0020);
      begin repeat (2) @(posedge clk); send_rsp(RSP_WB, 0, 3, 14'h0020, 1'b1, 64'h7777); end
    join
    settle();
    check(u_dat.mem[14'h0020] == 64'h7777 && u_own.mem[14'h0020] == 1'b0 && dut.w_empty,
          "early write-back matched to its PUTM");
    check(rsp_log.size() == 2, "two grants");
    rsp_log.delete();
    // 7
    send_rsp(RSP_DATA, 0, 1, 14'h0040, 1'b1, 64'h99); settle();
    check(rsp_log.size() == 1 && rsp_log[0].dest == 1 && rsp_log[0].data == 64'h99, "through traffic passes");
    check(idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
