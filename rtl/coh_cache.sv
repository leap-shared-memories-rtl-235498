// coh_cache: direct-mapped coherent cache of one coherent scratchpad client.
//
// Protocol: snoopy MOSI with a global ordering point.  Lines hold steady
// states only (I, S, O, M) plus a dirty bit; transient states are kept in the
// MSHR (coh_mshr).  Rules implemented here:
//   * Reads hit in M, O or S; writes hit only in M.  A write to an S or O
//     line, or any miss, sends GETM; a read miss sends GETS.
//   * A GETS answered by memory (the controller) grants M with clean data
//     (the "I upgrades to M on a first read" optimisation); answered by an
//     owning cache it grants S.  The dirty bit lets a clean M/O line be
//     written back as ownership only.
//   * Evicting an M/O line moves it to a write-back way of the MSHR and sends
//     PUTM; the way answers snoops as owner until the PUTM is activated, and
//     then sends the write-back (or a cancel, if a foreign GETM took the
//     ownership first) to the controller.  S lines are dropped silently.
//   * Snoops of foreign requests: GETS on M -> O and send data, on O send data;
//     GETM on M/O -> send data and go I, on S go I; a foreign PUTM
//     invalidates an S copy (so a line owned by memory has no cached copy).
//   * A foreign GETS/GETM ordered after our own outstanding request to the
//     same address goes to the MSHR forwarding list and is replayed on the
//     line once our access has completed.
// One local request is handled at a time (blocking on a miss); snoops keep
// being served while a miss is outstanding.  Each cycle performs at most one
// action, in priority order: miss completion, forwarding-list replay, miss
// retirement, snoop, local request.
// Interface timing: local requests use valid/ready; read data appears on
// lrsp_valid/lrsp_data one cycle after a hit, or one cycle after the miss
// completes, always in request order, and must be taken when valid.  Before
// starting a miss the cache checks that its request buffer has room for both
// the PUTM and the GET, so it never stalls on the network mid-transaction.
module coh_cache
  import leap_pkg::*;
#(
  parameter int MY_ID     = 0,
  parameter int ENTRIES   = 1024,
  parameter int WB_SETS   = 32,
  parameter int CT_IDX_W  = 3,
  parameter int FWD_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // local requests (line granularity, from the marshaller)
  input  logic              lreq_valid,
  output logic              lreq_ready,
  input  op_kind_e          lreq_op,
  input  addr_t             lreq_addr,
  input  data_t             lreq_wdata,
  input  logic [DATA_W/8-1:0] lreq_wmask,
  output logic              lrsp_valid,
  output data_t             lrsp_data,
  output logic              busy,
  // unactivated requests to the router
  output logic              ureq_valid,
  output coh_req_t          ureq_data,
  input  logic              ureq_ready,
  // activated requests (snoops) from the completion table
  input  logic              snp_valid,
  input  coh_req_t          snp_req,
  input  logic [CT_IDX_W-1:0] snp_idx,
  output logic              snp_ready,
  // snoop completion to the completion table
  output logic              cmp_valid,
  output logic [CT_IDX_W-1:0] cmp_idx,
  output logic              cmp_send,
  output rsp_kind_e         cmp_kind,
  output data_t             cmp_data,
  output logic              cmp_dirty,
  input  logic              cmp_ready,
  // data responses addressed to this client
  input  logic              drsp_valid,
  input  coh_rsp_t          drsp
);
  localparam int IDX_W = $clog2(ENTRIES);
  localparam int TAG_W = ADDR_W - IDX_W;
  localparam int FWD_W = 1 + CT_IDX_W;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  // ---------------- arrays ----------------
  tag_t       tag_a [ENTRIES];
  coh_state_e st_a  [ENTRIES];
  logic       dty_a [ENTRIES];
  data_t      dat_a [ENTRIES];

  logic       we_st, we_line;
  idx_t       wr_idx;
  coh_state_e wr_st;
  tag_t       wr_tag;
  logic       wr_dty;
  data_t      wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) st_a[i] <= ST_I;
    end else if (we_st || we_line) begin
      st_a[wr_idx] <= wr_st;
    end
  end

  always_ff @(posedge clk) begin
    if (we_line) begin
      tag_a[wr_idx] <= wr_tag;
      dty_a[wr_idx] <= wr_dty;
      dat_a[wr_idx] <= wr_data;
    end
  end

  function automatic data_t merge(input data_t base, input data_t wd,
                                  input logic [DATA_W/8-1:0] m);
    data_t r;
    for (int b = 0; b < DATA_W/8; b++)
      r[b*8 +: 8] = m[b] ? wd[b*8 +: 8] : base[b*8 +: 8];
    return r;
  endfunction

  // ---------------- MSHR ----------------
  addr_t wb_alloc_addr;
  logic  wb_alloc_busy, wb_alloc, wb_q_hit, wb_q_owner, wb_q_dirty;
  data_t wb_q_data;
  logic  wb_clear_owner, wb_free;
  logic  miss_alloc, miss_set_active, miss_set_local, miss_set_putm, miss_free;
  logic  miss_valid, miss_write, miss_active, miss_local, miss_got_data, miss_excl, miss_putm;
  addr_t miss_addr;
  data_t miss_data;
  logic  fwd_push, fwd_pop, fwd_empty, fwd_full;
  logic [FWD_W-1:0] fwd_push_data, fwd_head;

  coh_mshr #(.WB_SETS(WB_SETS), .FWD_DEPTH(FWD_DEPTH), .FWD_W(FWD_W)) u_mshr (
    .clk, .rst_n,
    .wb_alloc_addr, .wb_alloc_busy, .wb_alloc,
    .wb_alloc_data(dat_a[lreq_addr[IDX_W-1:0]]),
    .wb_alloc_dirty(dty_a[lreq_addr[IDX_W-1:0]]),
    .wb_q_addr(snp_req.addr), .wb_q_hit, .wb_q_owner, .wb_q_data, .wb_q_dirty,
    .wb_clear_owner, .wb_free,
    .miss_alloc, .miss_alloc_addr(lreq_addr), .miss_alloc_write(lreq_op == OP_WRITE),
    .miss_set_active, .miss_set_local,
    .miss_set_data(drsp_valid && drsp.kind == RSP_DATA),
    .miss_rsp_data(drsp.data), .miss_rsp_excl(drsp.excl),
    .miss_set_putm, .miss_free,
    .miss_valid, .miss_addr, .miss_write, .miss_active, .miss_local,
    .miss_got_data, .miss_data, .miss_excl, .miss_putm,
    .fwd_push, .fwd_push_data, .fwd_pop, .fwd_head, .fwd_empty, .fwd_full
  );

  // ---------------- unactivated request buffer ----------------
  logic     uq_push, uq_full, uq_empty;
  coh_req_t uq_in;
  logic [1:0] uq_count;
  sync_fifo #(.W($bits(coh_req_t)), .DEPTH(2)) u_uq (
    .clk, .rst_n,
    .push(uq_push), .wr_data(uq_in),
    .pop(ureq_valid && ureq_ready), .rd_data(ureq_data),
    .full(uq_full), .empty(uq_empty), .count(uq_count)
  );
  assign ureq_valid = !uq_empty;

  // ---------------- local request state ----------------
  logic              miss_done, get_pending;
  coh_req_t          get_req;
  data_t             cur_wdata;
  logic [DATA_W/8-1:0] cur_wmask;

  // lookups
  idx_t l_idx, s_idx, m_idx;
  tag_t l_tag, s_tag, m_tag;
  logic l_hit, s_hit;
  assign l_idx = lreq_addr[IDX_W-1:0];
  assign l_tag = lreq_addr[ADDR_W-1:IDX_W];
  assign s_idx = snp_req.addr[IDX_W-1:0];
  assign s_tag = snp_req.addr[ADDR_W-1:IDX_W];
  assign m_idx = miss_addr[IDX_W-1:0];
  assign m_tag = miss_addr[ADDR_W-1:IDX_W];
  assign l_hit = (st_a[l_idx] != ST_I) && (tag_a[l_idx] == l_tag);
  assign s_hit = (st_a[s_idx] != ST_I) && (tag_a[s_idx] == s_tag);
  assign wb_alloc_addr = {tag_a[l_idx], l_idx};

  logic comp_go, rep_go, free_go;
  assign comp_go = miss_valid && !miss_done && miss_active && (miss_got_data || miss_local);
  assign rep_go  = miss_valid && miss_done && !fwd_empty;
  assign free_go = miss_valid && miss_done && fwd_empty;

  logic  set_done, rsp_now, start_get_later;
  data_t rsp_now_data;
  logic  fwd_is_getm;
  logic [CT_IDX_W-1:0] fwd_idx;
  assign fwd_is_getm = fwd_head[FWD_W-1];
  assign fwd_idx     = fwd_head[CT_IDX_W-1:0];

  always_comb begin
    we_st = 1'b0; we_line = 1'b0;
    wr_idx = l_idx; wr_st = ST_I; wr_tag = l_tag; wr_dty = 1'b0; wr_data = '0;
    wb_alloc = 1'b0; wb_clear_owner = 1'b0; wb_free = 1'b0;
    miss_alloc = 1'b0; miss_set_active = 1'b0; miss_set_local = 1'b0;
    miss_set_putm = 1'b0; miss_free = 1'b0;
    fwd_push = 1'b0; fwd_pop = 1'b0;
    fwd_push_data = {snp_req.kind == REQ_GETM, snp_idx};
    cmp_valid = 1'b0; cmp_idx = snp_idx; cmp_send = 1'b0; cmp_kind = RSP_DATA;
    cmp_data = '0; cmp_dirty = 1'b0;
    snp_ready = 1'b0; lreq_ready = 1'b0;
    uq_push = 1'b0; uq_in = get_req;
    set_done = 1'b0; rsp_now = 1'b0; rsp_now_data = '0; start_get_later = 1'b0;

    if (get_pending) begin
      // second half of an eviction: the GET follows its PUTM
      uq_push = 1'b1;
    end

    if (comp_go) begin
      // ---- the outstanding access completes ----
      set_done = 1'b1;
      we_line  = 1'b1;
      wr_idx   = m_idx;
      wr_tag   = m_tag;
      if (miss_write) begin
        wr_data = merge(miss_local ? dat_a[m_idx] : miss_data, cur_wdata, cur_wmask);
        wr_st   = ST_M;
        wr_dty  = 1'b1;
      end else begin
        wr_data      = miss_data;
        wr_st        = miss_excl ? ST_M : ST_S;
        wr_dty       = 1'b0;
        rsp_now      = 1'b1;
        rsp_now_data = miss_data;
      end
    end else if (rep_go) begin
      // ---- replay one forwarded snoop on the completed line ----
      cmp_idx = fwd_idx;
      if (cmp_ready) begin
        fwd_pop   = 1'b1;
        cmp_valid = 1'b1;
        cmp_data  = dat_a[m_idx];
        cmp_dirty = dty_a[m_idx];
        wr_idx    = m_idx;
        if (!fwd_is_getm) begin
          if (st_a[m_idx] == ST_M || st_a[m_idx] == ST_O) begin
            cmp_send = 1'b1;
            we_st    = 1'b1;
            wr_st    = ST_O;
          end
        end else begin
          if (st_a[m_idx] == ST_M || st_a[m_idx] == ST_O) cmp_send = 1'b1;
          we_st = (st_a[m_idx] != ST_I);
          wr_st = ST_I;
        end
      end
    end else if (free_go) begin
      // ---- retire the miss; a later foreign PUTM drops our S copy ----
      miss_free = 1'b1;
      wr_idx    = m_idx;
      if (miss_putm && st_a[m_idx] == ST_S) begin
        we_st = 1'b1;
        wr_st = ST_I;
      end
    end else if (snp_valid) begin
      // ---- snoop of an activated request ----
      wr_idx = s_idx;
      if (snp_req.src == node_t'(MY_ID)) begin
        if (cmp_ready) begin
          snp_ready = 1'b1;
          cmp_valid = 1'b1;
          if (snp_req.kind == REQ_PUTM) begin
            cmp_send  = 1'b1;
            cmp_kind  = wb_q_owner ? RSP_WB : RSP_WBCANCEL;
            cmp_data  = wb_q_data;
            cmp_dirty = wb_q_dirty;
            wb_free   = 1'b1;
          end else begin
            miss_set_active = 1'b1;
            if (snp_req.kind == REQ_GETM && s_hit &&
                (st_a[s_idx] == ST_M || st_a[s_idx] == ST_O))
              miss_set_local = 1'b1;
          end
        end
      end else if (miss_valid && miss_active && miss_addr == snp_req.addr &&
                   snp_req.kind != REQ_PUTM) begin
        if (!fwd_full) begin
          snp_ready = 1'b1;
          fwd_push  = 1'b1;
        end
      end else if (cmp_ready) begin
        snp_ready = 1'b1;
        cmp_valid = 1'b1;
        if (miss_valid && miss_active && miss_addr == snp_req.addr) begin
          miss_set_putm = 1'b1;          // foreign PUTM after our request
        end else if (wb_q_hit) begin
          if (snp_req.kind != REQ_PUTM && wb_q_owner) begin
            cmp_send       = 1'b1;
            cmp_data       = wb_q_data;
            cmp_dirty      = wb_q_dirty;
            wb_clear_owner = (snp_req.kind == REQ_GETM);
          end
        end else if (s_hit) begin
          cmp_data  = dat_a[s_idx];
          cmp_dirty = dty_a[s_idx];
          unique case (snp_req.kind)
            REQ_GETS: begin
              if (st_a[s_idx] == ST_M || st_a[s_idx] == ST_O) begin
                cmp_send = 1'b1;
                we_st    = 1'b1;
                wr_st    = ST_O;
              end
            end
            REQ_GETM: begin
              cmp_send = (st_a[s_idx] == ST_M || st_a[s_idx] == ST_O);
              we_st    = 1'b1;
              wr_st    = ST_I;
            end
            default: begin
              if (st_a[s_idx] == ST_S) begin
                we_st = 1'b1;
                wr_st = ST_I;
              end
            end
          endcase
        end
      end
    end else if (lreq_valid && !miss_valid && !get_pending) begin
      // ---- local request ----
      wr_idx = l_idx;
      unique case (lreq_op)
        OP_READ: begin
          if (l_hit) begin
            lreq_ready   = 1'b1;
            rsp_now      = 1'b1;
            rsp_now_data = dat_a[l_idx];
          end
        end
        OP_WRITE: begin
          if (l_hit && st_a[l_idx] == ST_M) begin
            lreq_ready = 1'b1;
            we_line    = 1'b1;
            wr_tag     = l_tag;
            wr_st      = ST_M;
            wr_dty     = 1'b1;
            wr_data    = merge(dat_a[l_idx], lreq_wdata, lreq_wmask);
          end
        end
        default: lreq_ready = 1'b1;   // fences: the cache is in order
      endcase
      if ((lreq_op == OP_READ || lreq_op == OP_WRITE) && !lreq_ready) begin
        // miss or upgrade; victim needs a write-back if owned and different
        if (uq_empty && !((st_a[l_idx] == ST_M || st_a[l_idx] == ST_O) &&
                          tag_a[l_idx] != l_tag && wb_alloc_busy)) begin
          lreq_ready = 1'b1;
          miss_alloc = 1'b1;
          uq_in.kind = (lreq_op == OP_WRITE) ? REQ_GETM : REQ_GETS;
          uq_in.src  = node_t'(MY_ID);
          uq_in.addr = lreq_addr;
          if (tag_a[l_idx] != l_tag || st_a[l_idx] == ST_I) begin
            we_st = 1'b1;            // line becomes I for the new tag
            wr_st = ST_I;
            if ((st_a[l_idx] == ST_M || st_a[l_idx] == ST_O) && tag_a[l_idx] != l_tag) begin
              wb_alloc   = 1'b1;
              uq_in.kind = REQ_PUTM;
              uq_in.addr = wb_alloc_addr;
              start_get_later = 1'b1;
            end
          end
          uq_push = 1'b1;
        end
      end
    end
  end

  // registered bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_done   <= 1'b0;
      get_pending <= 1'b0;
      get_req     <= '0;
      lrsp_valid  <= 1'b0;
      lrsp_data   <= '0;
      cur_wdata   <= '0;
      cur_wmask   <= '0;
    end else begin
      lrsp_valid <= rsp_now;
      if (rsp_now) lrsp_data <= rsp_now_data;
      if (set_done)  miss_done <= 1'b1;
      if (miss_free) miss_done <= 1'b0;
      if (get_pending) get_pending <= 1'b0;
      if (miss_alloc) begin
        cur_wdata <= lreq_wdata;
        cur_wmask <= lreq_wmask;
        get_req   <= '{kind: (lreq_op == OP_WRITE) ? REQ_GETM : REQ_GETS,
                       src: node_t'(MY_ID), addr: lreq_addr};
        get_pending <= start_get_later;
      end
    end
  end

  assign busy = miss_valid || get_pending;

  a_own_get_matches: assert property (@(posedge clk) disable iff (!rst_n)
    (snp_valid && snp_ready && snp_req.src == node_t'(MY_ID) && snp_req.kind != REQ_PUTM)
      |-> (miss_valid && miss_addr == snp_req.addr));
  a_own_putm_hits: assert property (@(posedge clk) disable iff (!rst_n)
    (snp_valid && snp_ready && snp_req.src == node_t'(MY_ID) && snp_req.kind == REQ_PUTM)
      |-> wb_q_hit);
endmodule
