// coh_controller: ordering point of a coherence domain and its interface to
// the next-level memory.
//
// Ordering: every unactivated request that reaches the controller is
// activated in arrival order -- broadcast on the activated request ring and,
// in the same cycle, queued for the controller's own snoop.  All clients and
// the controller therefore see all requests in one global order.  A
// broadcast that has gone round the ring back to the controller is dropped.
//
// Directory: one owner bit per address, held in an owner-bit store; the data
// lives in a data store.  Both stores are private scratchpads reached
// through ports of this module (request valid/ready, in-order responses of
// any latency).  The controller snoops requests one at a time, in order:
//   * GETS/GETM to an address with a pending write-back (WSHR hit): the first
//     such requester is recorded and answered when the write-back data
//     arrives; later ones are left to that new owner.
//   * GETS/GETM otherwise: read the owner bit.  If memory owns the line, set
//     the bit, read the data and send it with `excl` (the requester becomes
//     M).  If a cache owns it, do nothing: the owner answers.
//   * PUTM: allocate a WSHR entry and wait for the write-back message.  A
//     PUTM to an address that already has an entry waits until it is gone.
// Write-back messages from the response ring take priority over snoops:
// WB writes the data if dirty, clears the owner bit -- or hands the line to
// the recorded requester together with the data -- and frees the entry;
// WBCANCEL (the client had lost ownership) just frees it.
module coh_controller
  import leap_pkg::*;
#(
  parameter int CTRL_ID      = 3,
  parameter int WSHR_ENTRIES = 8,
  parameter int ACT_DEPTH    = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // rings
  input  logic       ur_in_valid,
  input  coh_req_t   ur_in_data,
  output logic       ur_in_ready,
  output logic       ur_out_valid,
  output coh_req_t   ur_out_data,
  input  logic       ur_out_ready,
  input  logic       ar_in_valid,
  input  coh_req_t   ar_in_data,
  output logic       ar_in_ready,
  output logic       ar_out_valid,
  output coh_req_t   ar_out_data,
  input  logic       ar_out_ready,
  input  logic       rr_in_valid,
  input  coh_rsp_t   rr_in_data,
  output logic       rr_in_ready,
  output logic       rr_out_valid,
  output coh_rsp_t   rr_out_data,
  input  logic       rr_out_ready,
  // owner-bit private scratchpad
  output logic       own_req_valid,
  input  logic       own_req_ready,
  output logic       own_req_write,
  output addr_t      own_req_addr,
  output logic       own_req_wdata,
  input  logic       own_rsp_valid,
  input  logic       own_rsp_data,
  // data private scratchpad
  output logic       dat_req_valid,
  input  logic       dat_req_ready,
  output logic       dat_req_write,
  output addr_t      dat_req_addr,
  output data_t      dat_req_wdata,
  input  logic       dat_rsp_valid,
  input  data_t      dat_rsp_data,
  output logic       idle
);
  localparam int RQW = $bits(coh_req_t);
  localparam int RSW = $bits(coh_rsp_t);
  localparam int WI_W = (WSHR_ENTRIES > 1) ? $clog2(WSHR_ENTRIES) : 1;

  // ---------------- activation ----------------
  logic     ur_ej_valid, ur_ej_ready, ar_inj_valid, ar_inj_ready, act_full, act_empty;
  coh_req_t ur_ej_data, act_head;
  logic     act_pop, ar_ej_valid;
  logic [RQW-1:0] ar_ej_data;
  logic [$clog2(ACT_DEPTH+1)-1:0] act_count;

  ring_stop #(.W(RQW)) u_ur (
    .clk, .rst_n,
    .in_valid(ur_in_valid), .in_data(ur_in_data), .in_ready(ur_in_ready),
    .in_for_me(1'b1), .in_pass(1'b0),
    .out_valid(ur_out_valid), .out_data(ur_out_data), .out_ready(ur_out_ready),
    .inj_valid(1'b0), .inj_data('0), .inj_ready(),
    .ej_valid(ur_ej_valid), .ej_data(ur_ej_data), .ej_ready(ur_ej_ready)
  );

  assign ar_inj_valid = ur_ej_valid && !act_full;
  assign ur_ej_ready  = ar_inj_ready && !act_full;

  // broadcasts returning to the ordering point are dropped
  ring_stop #(.W(RQW)) u_ar (
    .clk, .rst_n,
    .in_valid(ar_in_valid), .in_data(ar_in_data), .in_ready(ar_in_ready),
    .in_for_me(1'b0), .in_pass(1'b0),
    .out_valid(ar_out_valid), .out_data(ar_out_data), .out_ready(ar_out_ready),
    .inj_valid(ar_inj_valid), .inj_data(ur_ej_data), .inj_ready(ar_inj_ready),
    .ej_valid(ar_ej_valid), .ej_data(ar_ej_data), .ej_ready(1'b1)
  );

  sync_fifo #(.W(RQW), .DEPTH(ACT_DEPTH)) u_actq (
    .clk, .rst_n,
    .push(ur_ej_valid && ur_ej_ready), .wr_data(ur_ej_data),
    .pop(act_pop), .rd_data(act_head),
    .full(act_full), .empty(act_empty), .count(act_count)
  );

  // ---------------- response ring ----------------
  logic     rr_for_me, rr_ej_valid, wb_full, wb_empty, wb_pop, wb_recirc, wb_skip;
  coh_rsp_t rr_ej_data, wb_head;
  logic     rq_push, rq_full, rq_empty, rq_pop_ok;
  coh_rsp_t rq_in, rq_head;
  logic [$clog2(WSHR_ENTRIES+ACT_DEPTH+1)-1:0] wb_count;
  logic [1:0] rq_count;
  assign rr_for_me = (rr_in_data.dest == node_t'(CTRL_ID));

  ring_stop #(.W(RSW)) u_rr (
    .clk, .rst_n,
    .in_valid(rr_in_valid), .in_data(rr_in_data), .in_ready(rr_in_ready),
    .in_for_me(rr_for_me), .in_pass(!rr_for_me),
    .out_valid(rr_out_valid), .out_data(rr_out_data), .out_ready(rr_out_ready),
    .inj_valid(!rq_empty), .inj_data(rq_head), .inj_ready(rq_pop_ok),
    .ej_valid(rr_ej_valid), .ej_data(rr_ej_data), .ej_ready(!wb_full && !wb_recirc)
  );

  // A write-back may overtake its own PUTM: the client sees the PUTM on the
  // ring before this controller has processed it.  Such a message is not yet
  // known to the WSHR; it is moved to the back of the queue and retried.
  sync_fifo #(.W(RSW), .DEPTH(WSHR_ENTRIES + ACT_DEPTH)) u_wbq (
    .clk, .rst_n,
    .push(wb_recirc || (rr_ej_valid && !wb_full)),
    .wr_data(wb_recirc ? wb_head : rr_ej_data),
    .pop(wb_pop), .rd_data(wb_head),
    .full(wb_full), .empty(wb_empty), .count(wb_count)
  );

  sync_fifo #(.W(RSW), .DEPTH(2)) u_rq (
    .clk, .rst_n,
    .push(rq_push), .wr_data(rq_in),
    .pop(!rq_empty && rq_pop_ok), .rd_data(rq_head),
    .full(rq_full), .empty(rq_empty), .count(rq_count)
  );

  // ---------------- WSHR ----------------
  addr_t w_q_addr;
  logic  w_hit, w_fwd_valid, w_full, w_alloc, w_set_fwd, w_free, w_empty;
  logic [WI_W-1:0] w_idx;
  node_t w_src, w_fwd_src;
  wshr #(.ENTRIES(WSHR_ENTRIES), .IDX_W(WI_W)) u_wshr (
    .clk, .rst_n,
    .q_addr(w_q_addr), .q_hit(w_hit), .q_idx(w_idx), .q_src(w_src),
    .q_fwd_valid(w_fwd_valid), .q_fwd_src(w_fwd_src), .full(w_full),
    .alloc(w_alloc), .alloc_src(act_head.src),
    .set_fwd(w_set_fwd), .fwd_src(act_head.src),
    .free(w_free), .empty(w_empty)
  );

  // ---------------- snoop / write-back engine ----------------
  typedef enum logic [2:0] {C_IDLE, C_OWN_WAIT, C_SET_OWN, C_DATA_WAIT, C_SEND} cstate_e;
  cstate_e  cs, cs_n;
  coh_req_t cur, cur_n;
  data_t    cur_data;

  always_comb begin
    cs_n = cs; cur_n = cur;
    act_pop = 1'b0; wb_pop = 1'b0; wb_recirc = 1'b0;
    w_q_addr = (wb_empty || wb_skip) ? act_head.addr : wb_head.addr;
    w_alloc = 1'b0; w_set_fwd = 1'b0; w_free = 1'b0;
    own_req_valid = 1'b0; own_req_write = 1'b0; own_req_addr = w_q_addr; own_req_wdata = 1'b0;
    dat_req_valid = 1'b0; dat_req_write = 1'b0; dat_req_addr = w_q_addr; dat_req_wdata = wb_head.data;
    rq_push = 1'b0;
    rq_in   = '{kind: RSP_DATA, dest: cur.src, src: node_t'(CTRL_ID), addr: cur.addr,
                excl: 1'b1, dirty: 1'b0, data: cur_data};

    unique case (cs)
      C_IDLE: begin
        if (!wb_empty && !wb_skip && !(w_hit && w_src == wb_head.src)) begin
          wb_recirc = 1'b1;
          wb_pop    = 1'b1;
        end else if (!wb_empty && !wb_skip) begin
          if (wb_head.kind == RSP_WBCANCEL) begin
            w_free = 1'b1;
            wb_pop = 1'b1;
          end else if ((!wb_head.dirty || dat_req_ready) && own_req_ready &&
                       (!w_fwd_valid || !rq_full)) begin
            dat_req_valid = wb_head.dirty;
            dat_req_write = 1'b1;
            own_req_valid = 1'b1;
            own_req_write = 1'b1;
            own_req_wdata = w_fwd_valid;   // line handed straight to the waiter
            rq_push       = w_fwd_valid;
            rq_in.dest    = w_fwd_src;
            rq_in.addr    = wb_head.addr;
            rq_in.data    = wb_head.data;
            w_free = 1'b1;
            wb_pop = 1'b1;
          end
        end else if (!act_empty) begin
          if (act_head.kind == REQ_PUTM) begin
            if (!w_hit && !w_full) begin
              w_alloc = 1'b1;
              act_pop = 1'b1;
            end
          end else if (w_hit) begin
            w_set_fwd = 1'b1;
            act_pop   = 1'b1;
          end else if (own_req_ready) begin
            own_req_valid = 1'b1;
            act_pop = 1'b1;
            cur_n   = act_head;
            cs_n    = C_OWN_WAIT;
          end
        end
      end
      C_OWN_WAIT: begin
        if (own_rsp_valid) cs_n = own_rsp_data ? C_IDLE : C_SET_OWN;
      end
      C_SET_OWN: begin
        own_req_addr  = cur.addr;
        dat_req_addr  = cur.addr;
        if (own_req_ready && dat_req_ready) begin
          own_req_valid = 1'b1;
          own_req_write = 1'b1;
          own_req_wdata = 1'b1;
          dat_req_valid = 1'b1;
          cs_n = C_DATA_WAIT;
        end
      end
      C_DATA_WAIT: begin
        if (dat_rsp_valid) cs_n = C_SEND;
      end
      default: begin   // C_SEND
        if (!rq_full) begin
          rq_push = 1'b1;
          cs_n    = C_IDLE;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs       <= C_IDLE;
      wb_skip  <= 1'b0;
      cur      <= '0;
      cur_data <= '0;
    end else begin
      cs      <= cs_n;
      cur     <= cur_n;
      wb_skip <= wb_recirc;     // give the snoop queue the next turn
      if (cs == C_DATA_WAIT && dat_rsp_valid) cur_data <= dat_rsp_data;
    end
  end

  assign idle = (cs == C_IDLE) && act_empty && wb_empty && w_empty && rq_empty;

  a_wb_known: assert property (@(posedge clk) disable iff (!rst_n)
    (wb_pop && !wb_recirc) |-> (w_hit && w_src == wb_head.src));
endmodule
