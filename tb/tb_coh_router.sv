// tb_coh_router: one router (node 1, controller at node 3) with all three
// rings opened up and a model cache on its local side.  Random traffic on
// every input, random back-pressure on every output.  Checked:
//   * unactivated ring: foreign messages pass in order, the cache's
//     requests are injected in order, nothing is lost or duplicated;
//   * activated ring: every message is passed on in order and also handed
//     to the cache as a snoop, in order;
//   * completions (in any order, sometimes in the same cycle as the snoop)
//     that carry data produce a response from node 1 to the requester, or to
//     the controller for a write-back or cancel, with the snoop's address;
//   * response ring: messages for node 1 go to the cache, others pass on.
// At the end every queue is drained and the router reports idle.
`timescale 1ns/1ps
module tb_coh_router;
  import leap_pkg::*;
  localparam int N_MSG = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic ur_in_valid, ur_in_ready, ur_out_valid, ur_out_ready;
  logic ar_in_valid, ar_in_ready, ar_out_valid, ar_out_ready;
  logic rr_in_valid, rr_in_ready, rr_out_valid, rr_out_ready;
  coh_req_t ur_in_data, ur_out_data, ar_in_data, ar_out_data, ureq_data, snp_req;
  coh_rsp_t rr_in_data, rr_out_data, drsp;
  logic ureq_valid, ureq_ready, snp_valid, snp_ready, cmp_valid, cmp_send, cmp_dirty, cmp_ready;
  logic drsp_valid, idle;
  logic [2:0] snp_idx, cmp_idx;
  rsp_kind_e cmp_kind;
  data_t cmp_data;

  coh_router #(.MY_ID(1), .CTRL_ID(3), .CT_ENTRIES(8), .CT_IDX_W(3)) dut (.*);

  coh_req_t exp_ur_pass [$], exp_ur_own [$], exp_ar [$], exp_snp [$];
  coh_rsp_t exp_rr_pass [$], exp_rr_own [$], exp_drsp [$];
  coh_req_t held [8];
  bit       held_v [8];
  int sent_ur = 0, sent_own = 0, sent_ar = 0, sent_rr = 0, n_bypass = 0;

  function automatic coh_req_t rnd_req(input int src);
    coh_req_t r;
    r.kind = req_kind_e'($urandom_range(2));
    r.src  = node_t'(src);
    r.addr = addr_t'($urandom);
    return r;
  endfunction

  // expected response for a completion
  function automatic coh_rsp_t rsp_for(input coh_req_t r, input rsp_kind_e k, input data_t d, input logic dt);
    coh_rsp_t s;
    s.kind = k; s.dest = (k == RSP_DATA) ? r.src : node_t'(3); s.src = node_t'(1);
    s.addr = r.addr; s.excl = 1'b0; s.dirty = dt; s.data = d;
    return s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ur_in_valid && ur_in_ready) begin exp_ur_pass.push_back(ur_in_data); sent_ur++; end
    if (ureq_valid && ureq_ready) begin exp_ur_own.push_back(ureq_data); sent_own++; end
    if (ur_out_valid && ur_out_ready) begin
      if (exp_ur_pass.size() != 0 && ur_out_data == exp_ur_pass[0]) void'(exp_ur_pass.pop_front());
      else if (exp_ur_own.size() != 0 && ur_out_data == exp_ur_own[0]) void'(exp_ur_own.pop_front());
      else check(0, "unexpected unactivated message");
      checks++;
    end
    if (ar_in_valid && ar_in_ready) begin exp_ar.push_back(ar_in_data); exp_snp.push_back(ar_in_data); sent_ar++; end
    if (ar_out_valid && ar_out_ready) check(exp_ar.size() != 0 && ar_out_data == exp_ar.pop_front(), "broadcast passed in order");
    // snoop and completion
    if (cmp_valid && cmp_ready) begin
      automatic coh_req_t r;
      if (snp_valid && snp_ready && snp_idx == cmp_idx) begin r = snp_req; n_bypass++; end
      else begin
        check(held_v[cmp_idx], "completion of a held snoop");
        r = held[cmp_idx]; held_v[cmp_idx] = 0;
      end
      if (cmp_send) exp_rr_own.push_back(rsp_for(r, cmp_kind, cmp_data, cmp_dirty));
    end
    if (snp_valid && snp_ready) begin
      check(exp_snp.size() != 0 && snp_req == exp_snp.pop_front(), "snoop in order");
      if (!(cmp_valid && cmp_ready && snp_idx == cmp_idx)) begin
        check(!held_v[snp_idx], "snoop index free");
        held[snp_idx] = snp_req; held_v[snp_idx] = 1;
      end
    end
    if (rr_in_valid && rr_in_ready) begin
      if (rr_in_data.dest == 1) exp_drsp.push_back(rr_in_data); else exp_rr_pass.push_back(rr_in_data);
      sent_rr++;
    end
    if (drsp_valid) check(exp_drsp.size() != 0 && drsp == exp_drsp.pop_front(), "response for node 1 ejected");
    if (rr_out_valid && rr_out_ready) begin
      if (exp_rr_pass.size() != 0 && rr_out_data == exp_rr_pass[0]) void'(exp_rr_pass.pop_front());
      else if (exp_rr_own.size() != 0 && rr_out_data == exp_rr_own[0]) void'(exp_rr_own.pop_front());
      else check(0, "unexpected response on the ring");
      checks++;
    end
  end

  // input handshakes seen at the last edge
  logic ur_in_ready_q, ureq_ready_q, ar_in_ready_q, rr_in_ready_q;
  always @(posedge clk) begin
    ur_in_ready_q <= ur_in_ready && ur_in_valid;
    ureq_ready_q  <= ureq_ready && ureq_valid;
    ar_in_ready_q <= ar_in_ready && ar_in_valid;
    rr_in_ready_q <= rr_in_ready && rr_in_valid;
  end

  bit stop_in = 0;
  always @(negedge clk) if (rst_n) begin
    ur_out_ready = ($urandom_range(3) != 0);
    ar_out_ready = ($urandom_range(3) != 0);
    rr_out_ready = ($urandom_range(3) != 0);
    if (!ur_in_valid || ur_in_ready_q) begin
      ur_in_valid = !stop_in && sent_ur < N_MSG && $urandom_range(2) == 0;
      ur_in_data  = rnd_req($urandom_range(1) ? 0 : 2);
    end
    if (!ureq_valid || ureq_ready_q) begin
      ureq_valid = !stop_in && sent_own < N_MSG && $urandom_range(2) == 0;
      ureq_data  = rnd_req(1);
    end
    if (!ar_in_valid || ar_in_ready_q) begin
      ar_in_valid = !stop_in && sent_ar < N_MSG && $urandom_range(2) == 0;
      ar_in_data  = rnd_req($urandom_range(3));
    end
    if (!rr_in_valid || rr_in_ready_q) begin
      rr_in_valid = !stop_in && sent_rr < N_MSG && $urandom_range(2) == 0;
      rr_in_data  = '{kind: rsp_kind_e'($urandom_range(2)), dest: node_t'($urandom_range(3)),
                      src: node_t'($urandom_range(3)), addr: addr_t'($urandom), excl: 1'($urandom),
                      dirty: 1'($urandom), data: {$urandom, $urandom}};
    end
    // model cache: take snoops, complete held ones or the new one at random
    snp_ready = ($urandom_range(1) == 1);
    cmp_valid = 0; cmp_idx = '0;
    cmp_send = ($urandom_range(1) == 1);
    cmp_kind = rsp_kind_e'($urandom_range(2));
    cmp_data = {$urandom, $urandom};
    cmp_dirty = 1'($urandom);
    if ($urandom_range(2) == 0) begin
      #1;
      if (snp_valid && snp_ready && $urandom_range(1) == 1) begin
        cmp_valid = 1; cmp_idx = snp_idx;
      end else begin
        for (int k = 0; k < 8; k++) begin
          automatic int i = $urandom_range(7);
          if (held_v[i] && !cmp_valid) begin cmp_valid = 1; cmp_idx = 3'(i); end
        end
      end
    end
  end

  initial begin
    ur_in_valid = 0; ur_in_data = '0; ureq_valid = 0; ureq_data = '0; ar_in_valid = 0; ar_in_data = '0;
    rr_in_valid = 0; rr_in_data = '0; ur_out_ready = 1; ar_out_ready = 1; rr_out_ready = 1;
    snp_ready = 0; cmp_valid = 0; cmp_idx = '0; cmp_send = 0; cmp_kind = RSP_DATA; cmp_data = '0; cmp_dirty = 0;
    for (int i = 0; i < 8; i++) held_v[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (sent_ur == N_MSG && sent_own == N_MSG && sent_ar == N_MSG && sent_rr == N_MSG);
    stop_in = 1;
    repeat (300) @(posedge clk);
    check(exp_ur_pass.size() == 0 && exp_ur_own.size() == 0 && exp_ar.size() == 0 && exp_snp.size() == 0 &&
          exp_rr_pass.size() == 0 && exp_rr_own.size() == 0 && exp_drsp.size() == 0, "everything delivered");
    check(idle, "idle when drained");
    check(n_bypass > 0, "same-cycle completions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
