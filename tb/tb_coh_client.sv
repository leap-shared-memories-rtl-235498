// tb_coh_client: one coherent scratchpad client (32-bit client words, two
// per 64-bit line, a 16-line cache) on a ring with the controller and
// behavioural private scratchpads.  A random sequence of reads, writes and
// fences covers 64 lines, so lines are missed, written, evicted (dirty and
// clean write-backs), re-fetched from memory and upgraded.  Every read is
// checked against a reference copy of the address space; every fence must
// be accepted; request_pending must be high while a read is outstanding and
// fall once the client is drained.  At the end the controller is idle.
`timescale 1ns/1ps
module tb_coh_client;
  import leap_pkg::*;
  localparam int CW = 32, AW = ADDR_W + 1, NL = 64, OPS = 6000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic creq_valid, creq_ready, crsp_valid, request_pending;
  op_kind_e creq_op;
  logic [AW-1:0] creq_addr;
  logic [CW-1:0] creq_wdata, crsp_data;
  // rings: client -> controller -> client
  logic u0v, u0r, u1v, u1r, a0v, a0r, a1v, a1r, r0v, r0r, r1v, r1r;
  coh_req_t u0d, u1d, a0d, a1d;
  coh_rsp_t r0d, r1d;
  logic own_req_valid, own_req_ready, own_req_write, own_req_wdata, own_rsp_valid, own_rsp_data;
  logic dat_req_valid, dat_req_ready, dat_req_write, dat_rsp_valid, idle;
  addr_t own_req_addr, dat_req_addr;
  data_t dat_req_wdata, dat_rsp_data;

  coh_client #(.MY_ID(0), .CTRL_ID(1), .CLIENT_W(CW), .CACHE_ENTRIES(16), .MSHR_SETS(4),
               .CT_ENTRIES(8), .FWD_DEPTH(1)) dut (
    .clk, .rst_n,
    .creq_valid, .creq_ready, .creq_op, .creq_addr, .creq_wdata, .crsp_valid, .crsp_data, .request_pending,
    .ur_in_valid(u1v), .ur_in_data(u1d), .ur_in_ready(u1r), .ur_out_valid(u0v), .ur_out_data(u0d), .ur_out_ready(u0r),
    .ar_in_valid(a1v), .ar_in_data(a1d), .ar_in_ready(a1r), .ar_out_valid(a0v), .ar_out_data(a0d), .ar_out_ready(a0r),
    .rr_in_valid(r1v), .rr_in_data(r1d), .rr_in_ready(r1r), .rr_out_valid(r0v), .rr_out_data(r0d), .rr_out_ready(r0r));

  coh_controller #(.CTRL_ID(1)) u_ctrl (
    .clk, .rst_n,
    .ur_in_valid(u0v), .ur_in_data(u0d), .ur_in_ready(u0r), .ur_out_valid(u1v), .ur_out_data(u1d), .ur_out_ready(u1r),
    .ar_in_valid(a0v), .ar_in_data(a0d), .ar_in_ready(a0r), .ar_out_valid(a1v), .ar_out_data(a1d), .ar_out_ready(a1r),
    .rr_in_valid(r0v), .rr_in_data(r0d), .rr_in_ready(r0r), .rr_out_valid(r1v), .rr_out_data(r1d), .rr_out_ready(r1r),
    .own_req_valid, .own_req_ready, .own_req_write, .own_req_addr, .own_req_wdata,
    .own_rsp_valid, .own_rsp_data,
    .dat_req_valid, .dat_req_ready, .dat_req_write, .dat_req_addr, .dat_req_wdata,
    .dat_rsp_valid, .dat_rsp_data, .idle);
  pscratch_model #(.W(1),  .AW(ADDR_W), .LAT(3), .INIT_ADDR(1'b0)) u_own (
    .clk, .rst_n, .req_valid(own_req_valid), .req_ready(own_req_ready),
    .req_write(own_req_write), .req_addr(own_req_addr), .req_wdata(own_req_wdata),
    .rsp_valid(own_rsp_valid), .rsp_data(own_rsp_data));
  pscratch_model #(.W(64), .AW(ADDR_W), .LAT(6), .INIT_ADDR(1'b1)) u_dat (
    .clk, .rst_n, .req_valid(dat_req_valid), .req_ready(dat_req_ready),
    .req_write(dat_req_write), .req_addr(dat_req_addr), .req_wdata(dat_req_wdata),
    .rsp_valid(dat_rsp_valid), .rsp_data(dat_rsp_data));

  logic [CW-1:0] ref_mem [2*NL];
  logic [CW-1:0] exp_q [$];
  int ops = 0, reads = 0, writes = 0, fences = 0, n_wb = 0;

  always @(posedge clk) if (rst_n) begin
    if (crsp_valid) begin
      check(exp_q.size() != 0 && crsp_data == exp_q.pop_front(), "read data");
    end
    if (exp_q.size() != 0) check(request_pending, "pending while a read is outstanding");
    if (creq_valid && creq_ready && creq_op == OP_READ) exp_q.push_back(ref_mem[creq_addr]);
    if (r0v && r0r && r0d.kind == RSP_WB) n_wb++;
  end

  initial begin
    creq_valid = 0; creq_op = OP_READ; creq_addr = '0; creq_wdata = '0;
    // line a: low word 0, high word a (memory initial contents)
    for (int a = 0; a < NL; a++) begin ref_mem[2*a] = '0; ref_mem[2*a+1] = CW'(a); end
    repeat (3) @(posedge clk); rst_n = 1;
    while (ops < OPS) begin
      automatic int k = $urandom_range(9);
      automatic int w = $urandom_range(2 * NL - 1);
      @(negedge clk);
      creq_valid = 1; creq_addr = AW'(w);
      if (k < 5) begin
        creq_op = OP_READ;
      end else if (k < 9) begin
        creq_op = OP_WRITE; creq_wdata = $urandom;
      end else begin
        creq_op = op_kind_e'(OP_FENCE_RD + $urandom_range(2));
      end
      #1; while (!creq_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      if (creq_op == OP_READ) reads++;
      else if (creq_op == OP_WRITE) begin ref_mem[w] = creq_wdata; writes++; end
      else fences++;
      ops++;
      #1; creq_valid = 0;
      repeat ($urandom_range(2)) @(posedge clk);
    end
    repeat (400) @(posedge clk);
    check(exp_q.size() == 0, "all reads answered");
    check(!request_pending, "nothing pending when drained");
    check(idle, "controller idle");
    $display("reads %0d writes %0d fences %0d write-backs %0d", reads, writes, fences, n_wb);
    check(n_wb > 0 && fences > 0, "write-backs and fences exercised");
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
