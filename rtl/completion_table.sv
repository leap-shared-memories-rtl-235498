// completion_table: router table for activated requests snooped by a cache.
//
// Every activated request that reaches a client takes a table entry before
// it enters the cache pipeline; when the table is full the activated ring
// waits, so the cache itself never stalls on the network.  An entry keeps
// the requester id and address.  The cache finishes a snoop by naming the
// entry (cmp_idx) and saying whether a response is due and of what kind; the
// table builds the response message -- data goes back to the requester,
// write-backs and cancels go to the controller -- and frees the entry.  A
// snoop placed on the cache's forwarding list keeps its entry until it is
// replayed, so the table size bounds the snoops in flight.
// Responses wait in a two-entry buffer in front of the response ring; the
// cache may only complete a snoop when that buffer has room (cmp_ready).
// Free entries are found with a lowest-index-first search.
module completion_table
  import leap_pkg::*;
#(
  parameter int MY_ID    = 0,
  parameter int CTRL_ID  = 3,
  parameter int ENTRIES  = 8,
  parameter int IDX_W    = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // activated requests from the ring
  input  logic             in_valid,
  input  coh_req_t         in_req,
  output logic             in_ready,
  // to the cache
  output logic             snp_valid,
  output coh_req_t         snp_req,
  output logic [IDX_W-1:0] snp_idx,
  input  logic             snp_ready,
  // completions from the cache
  input  logic             cmp_valid,
  input  logic [IDX_W-1:0] cmp_idx,
  input  logic             cmp_send,
  input  rsp_kind_e        cmp_kind,
  input  data_t            cmp_data,
  input  logic             cmp_dirty,
  output logic             cmp_ready,
  // responses to the ring
  output logic             rsp_valid,
  output coh_rsp_t         rsp_data,
  input  logic             rsp_ready,
  output logic             empty
);
  logic  used [ENTRIES];
  node_t ent_src [ENTRIES];
  addr_t ent_addr [ENTRIES];

  logic             have_free;
  logic [IDX_W-1:0] free_idx;
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!used[i]) begin
        have_free = 1'b1;
        free_idx  = IDX_W'(i);
      end
    end
  end

  assign snp_valid = in_valid && have_free;
  assign snp_req   = in_req;
  assign snp_idx   = free_idx;
  assign in_ready  = snp_ready && have_free;

  logic alloc, bypass;
  assign alloc  = in_valid && in_ready;
  // a snoop the cache finishes in the cycle it arrives never occupies an entry
  assign bypass = alloc && cmp_valid && (cmp_idx == free_idx);

  // response buffer
  logic     rq_full, rq_empty, rq_push;
  coh_rsp_t rq_in;
  logic [1:0] rq_count;
  assign cmp_ready = !rq_full;
  assign rq_push   = cmp_valid && cmp_send && cmp_ready;
  always_comb begin
    rq_in.kind  = cmp_kind;
    rq_in.dest  = (cmp_kind != RSP_DATA) ? node_t'(CTRL_ID) :
                  bypass ? in_req.src : ent_src[cmp_idx];
    rq_in.src   = node_t'(MY_ID);
    rq_in.addr  = bypass ? in_req.addr : ent_addr[cmp_idx];
    rq_in.excl  = 1'b0;
    rq_in.dirty = cmp_dirty;
    rq_in.data  = cmp_data;
  end
  sync_fifo #(.W($bits(coh_rsp_t)), .DEPTH(2)) u_rq (
    .clk, .rst_n,
    .push(rq_push), .wr_data(rq_in),
    .pop(rsp_valid && rsp_ready), .rd_data(rsp_data),
    .full(rq_full), .empty(rq_empty), .count(rq_count)
  );
  assign rsp_valid = !rq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) used[i] <= 1'b0;
    end else begin
      if (cmp_valid && cmp_ready && !bypass) used[cmp_idx] <= 1'b0;
      if (alloc && !(bypass && cmp_ready)) used[free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      ent_src[free_idx]   <= in_req.src;
      ent_addr[free_idx] <= in_req.addr;
    end
  end

  always_comb begin
    empty = 1'b1;
    for (int i = 0; i < ENTRIES; i++) if (used[i]) empty = 1'b0;
  end

  a_cmp_used: assert property (@(posedge clk) disable iff (!rst_n)
    cmp_valid && cmp_ready |-> (used[cmp_idx] || bypass));
endmodule
