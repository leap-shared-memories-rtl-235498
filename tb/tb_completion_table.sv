// tb_completion_table: activated requests enter the table, the test bench
// plays the cache and completes them out of order, sometimes in the same
// cycle they arrive.  Checks the responses built from the stored requester
// and address (data to the requester, write-backs to the controller), that
// the table stops accepting when all entries are held, and that it drains.
`timescale 1ns/1ps
module tb_completion_table;
  import leap_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, snp_valid, snp_ready, cmp_valid, cmp_send, cmp_dirty, cmp_ready;
  logic rsp_valid, rsp_ready, empty;
  coh_req_t in_req, snp_req;
  logic [2:0] snp_idx, cmp_idx;
  rsp_kind_e cmp_kind;
  data_t cmp_data;
  coh_rsp_t rsp_data;
  completion_table #(.MY_ID(1), .CTRL_ID(3), .ENTRIES(8), .IDX_W(3)) dut (.*);

  coh_req_t held [8];
  bit       hv [8];
  coh_rsp_t exp_q [$];
  int n_full = 0, n_bypass = 0, sent = 0;
  bit cmp_hs, in_hs;
  logic [2:0] hs_idx;
  coh_req_t hs_req;

  always @(negedge clk) if (rst_n && rsp_valid && rsp_ready) begin
    checks++;
    if (exp_q.size() == 0 || rsp_data != exp_q[0]) begin
      failures++;
      $display("FAIL: response dest=%0d addr=%0h", rsp_data.dest, rsp_data.addr);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  initial begin
    in_valid = 0; in_req = '0; snp_ready = 0; cmp_valid = 0; cmp_idx = 0; cmp_send = 0;
    cmp_kind = RSP_DATA; cmp_data = '0; cmp_dirty = 0; rsp_ready = 0;
    for (int i = 0; i < 8; i++) hv[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      int pick;
      @(negedge clk);
      // new activated request
      if (c < 4800 && !in_valid && $urandom_range(1)) begin
        in_valid = 1;
        in_req = '{kind: req_kind_e'($urandom_range(2)), src: node_t'($urandom_range(3)), addr: addr_t'($urandom)};
      end
      snp_ready = 1;
      rsp_ready = $urandom_range(3) != 0;
      // complete one held entry, or the arriving one
      cmp_valid = 0;
      pick = -1;
      if ($urandom_range(2) == 0) begin
        for (int i = 0; i < 8; i++) if (hv[i] && pick < 0 && $urandom_range(1)) pick = i;
      end
      #1;
      if (pick < 0 && in_valid && snp_valid && $urandom_range(3) == 0) begin
        pick = 8;                         // same-cycle completion
      end
      if (pick >= 0) begin
        cmp_valid = 1;
        cmp_idx   = (pick == 8) ? snp_idx : 3'(pick);
        cmp_send  = $urandom_range(1);
        cmp_kind  = rsp_kind_e'($urandom_range(2));
        cmp_data  = {$urandom, $urandom};
        cmp_dirty = $urandom_range(1);
      end
      #1;
      if (in_valid && !in_ready && !snp_valid) n_full++;
      cmp_hs = cmp_valid && cmp_ready;
      in_hs  = in_valid && in_ready;
      hs_idx = snp_idx;
      hs_req = snp_req;
      @(posedge clk);
      #1;
      if (cmp_hs) begin
        coh_req_t r;
        r = (pick == 8) ? in_req : held[pick];
        if (pick < 8) hv[pick] = 0; else n_bypass++;
        if (cmp_send) exp_q.push_back('{kind: cmp_kind,
                                        dest: (cmp_kind == RSP_DATA) ? r.src : node_t'(3),
                                        src: node_t'(1), addr: r.addr, excl: 1'b0,
                                        dirty: cmp_dirty, data: cmp_data});
      end
      if (in_hs) begin
        checks++;
        if (hs_req != in_req) begin failures++; $display("FAIL: snoop request altered"); end
        if (!(cmp_hs && pick == 8)) begin
          if (hv[hs_idx]) begin failures++; $display("FAIL: entry %0d given twice", hs_idx); end
          hv[hs_idx] = 1;
          held[hs_idx] = in_req;
        end
        in_valid = 0;
      end
      #1;
      cmp_valid = 0;
    end
    // drain
    for (int i = 0; i < 8; i++) if (hv[i]) begin
      @(negedge clk);
      cmp_valid = 1; cmp_idx = 3'(i); cmp_send = 0;
      #1;
      while (!cmp_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1; cmp_valid = 0; hv[i] = 0;
    end
    rsp_ready = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (!empty || exp_q.size() != 0) begin failures++; $display("FAIL: not drained"); end
    checks++;
    if (n_full == 0 || n_bypass == 0) begin failures++; $display("FAIL: coverage full=%0d bypass=%0d", n_full, n_bypass); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
