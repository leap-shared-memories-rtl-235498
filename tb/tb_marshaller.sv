// tb_marshaller: 16-bit client words on 64-bit lines (four words per line).
// The test bench plays the cache: it keeps line storage, applies masked
// writes and answers reads one cycle later, with random back-pressure.
// Client reads are checked against a word-level reference memory, which also
// checks that a write touches only its own word.
`timescale 1ns/1ps
module tb_marshaller;
  import leap_pkg::*;
  localparam int CW = 16;
  localparam int CAW = ADDR_W + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic creq_valid, creq_ready, crsp_valid, lreq_valid, lreq_ready, lrsp_valid;
  op_kind_e creq_op, lreq_op;
  logic [CAW-1:0] creq_addr;
  logic [CW-1:0] creq_wdata, crsp_data;
  addr_t lreq_addr;
  data_t lreq_wdata, lrsp_data;
  logic [7:0] lreq_wmask;

  marshaller #(.CLIENT_W(CW)) dut (.*);

  // fake cache: 16 lines
  data_t lines [16];
  always @(posedge clk) begin
    lrsp_valid <= 1'b0;
    if (rst_n && lreq_valid && lreq_ready) begin
      if (lreq_op == OP_WRITE)
        for (int b = 0; b < 8; b++) if (lreq_wmask[b]) lines[lreq_addr[3:0]][b*8 +: 8] <= lreq_wdata[b*8 +: 8];
      if (lreq_op == OP_READ) begin
        lrsp_valid <= 1'b1;
        lrsp_data  <= lines[lreq_addr[3:0]];
      end
    end
    lreq_ready <= ($urandom_range(3) != 0);
  end

  logic [CW-1:0] ref_mem [64];
  logic [CW-1:0] exp_q [$];
  always @(negedge clk) if (rst_n && crsp_valid) begin
    checks++;
    if (exp_q.size() == 0 || crsp_data != exp_q[0]) begin
      failures++;
      $display("FAIL: read %h expected %h", crsp_data, exp_q.size() ? exp_q[0] : 16'hxxxx);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  task automatic issue(input op_kind_e op, input int a, input logic [CW-1:0] d);
    @(negedge clk);
    creq_valid = 1; creq_op = op; creq_addr = CAW'(a); creq_wdata = d;
    #1;
    while (!creq_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    creq_valid = 0;
  endtask

  initial begin
    creq_valid = 0; creq_op = OP_READ; creq_addr = 0; creq_wdata = 0;
    lrsp_valid = 0; lreq_ready = 0; lrsp_data = 0;
    for (int i = 0; i < 16; i++) lines[i] = '0;
    for (int i = 0; i < 64; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int a, r;
      logic [CW-1:0] d;
      a = $urandom_range(63);
      r = $urandom_range(9);
      d = CW'($urandom);
      if (r < 4) begin
        ref_mem[a] = d;
        issue(OP_WRITE, a, d);
      end else if (r < 9) begin
        exp_q.push_back(ref_mem[a]);
        issue(OP_READ, a, '0);
      end else begin
        issue(OP_FENCE_FULL, 0, '0);
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d reads unanswered", exp_q.size()); end
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
