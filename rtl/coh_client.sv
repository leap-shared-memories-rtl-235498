// coh_client: one coherent scratchpad client.
//
// The user-facing side is the scratchpad interface: read requests, read
// responses, writes, and three kinds of fences (read, write, full), plus a
// `request_pending` flag that is high while any request is incomplete.
// Inside: a marshaller (partial words), a direct-mapped coherent cache and a
// router onto the three coherence rings.
// The cache serves local requests in order, so every fence is already
// satisfied when it reaches the cache and retires at once; read responses
// come back in request order, one cycle after a hit at the earliest.
// Interface: valid/ready for requests; crsp_valid is a one-cycle strobe
// that the user must take.
module coh_client
  import leap_pkg::*;
#(
  parameter int MY_ID         = 0,
  parameter int CTRL_ID       = 3,
  parameter int CLIENT_W      = 64,
  parameter int CACHE_ENTRIES = 1024,
  parameter int MSHR_SETS     = 32,
  parameter int CT_ENTRIES    = 8,
  parameter int FWD_DEPTH     = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // scratchpad interface
  input  logic       creq_valid,
  output logic       creq_ready,
  input  op_kind_e   creq_op,
  input  logic [ADDR_W+$clog2(DATA_W/CLIENT_W)-1:0] creq_addr,
  input  logic [CLIENT_W-1:0] creq_wdata,
  output logic       crsp_valid,
  output logic [CLIENT_W-1:0] crsp_data,
  output logic       request_pending,
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
  input  logic       rr_out_ready
);
  localparam int CT_IDX_W = (CT_ENTRIES > 1) ? $clog2(CT_ENTRIES) : 1;

  logic     lreq_valid, lreq_ready, lrsp_valid, cache_busy;
  op_kind_e lreq_op;
  addr_t    lreq_addr;
  data_t    lreq_wdata, lrsp_data;
  logic [DATA_W/8-1:0] lreq_wmask;

  marshaller #(.CLIENT_W(CLIENT_W)) u_marsh (
    .clk, .rst_n,
    .creq_valid, .creq_ready, .creq_op, .creq_addr, .creq_wdata,
    .crsp_valid, .crsp_data,
    .lreq_valid, .lreq_ready, .lreq_op, .lreq_addr, .lreq_wdata, .lreq_wmask,
    .lrsp_valid, .lrsp_data
  );

  logic      ureq_valid, ureq_ready, snp_valid, snp_ready;
  coh_req_t  ureq_data, snp_req;
  logic [CT_IDX_W-1:0] snp_idx, cmp_idx;
  logic      cmp_valid, cmp_send, cmp_dirty, cmp_ready, drsp_valid, router_idle;
  rsp_kind_e cmp_kind;
  data_t     cmp_data;
  coh_rsp_t  drsp;

  coh_cache #(.MY_ID(MY_ID), .ENTRIES(CACHE_ENTRIES), .WB_SETS(MSHR_SETS),
              .CT_IDX_W(CT_IDX_W), .FWD_DEPTH(FWD_DEPTH)) u_cache (
    .clk, .rst_n,
    .lreq_valid, .lreq_ready, .lreq_op, .lreq_addr, .lreq_wdata, .lreq_wmask,
    .lrsp_valid, .lrsp_data, .busy(cache_busy),
    .ureq_valid, .ureq_data, .ureq_ready,
    .snp_valid, .snp_req, .snp_idx, .snp_ready,
    .cmp_valid, .cmp_idx, .cmp_send, .cmp_kind, .cmp_data, .cmp_dirty, .cmp_ready,
    .drsp_valid, .drsp
  );

  coh_router #(.MY_ID(MY_ID), .CTRL_ID(CTRL_ID), .CT_ENTRIES(CT_ENTRIES), .CT_IDX_W(CT_IDX_W)) u_router (
    .clk, .rst_n,
    .ur_in_valid, .ur_in_data, .ur_in_ready, .ur_out_valid, .ur_out_data, .ur_out_ready,
    .ar_in_valid, .ar_in_data, .ar_in_ready, .ar_out_valid, .ar_out_data, .ar_out_ready,
    .rr_in_valid, .rr_in_data, .rr_in_ready, .rr_out_valid, .rr_out_data, .rr_out_ready,
    .ureq_valid, .ureq_data, .ureq_ready,
    .snp_valid, .snp_req, .snp_idx, .snp_ready,
    .cmp_valid, .cmp_idx, .cmp_send, .cmp_kind, .cmp_data, .cmp_dirty, .cmp_ready,
    .drsp_valid, .drsp, .idle(router_idle)
  );

  // a read is pending from acceptance until its response leaves the cache
  logic [3:0] reads_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reads_out <= '0;
    else reads_out <= reads_out
                      + 4'((creq_valid && creq_ready && creq_op == OP_READ) ? 1 : 0)
                      - 4'(crsp_valid ? 1 : 0);
  end
  assign request_pending = cache_busy || (reads_out != '0) || lrsp_valid;
endmodule
