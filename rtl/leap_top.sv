// leap_top: a coherence domain, a lock group and a barrier group.
//
// Coherence domain: N_CLIENTS coherent scratchpad clients and one coherent
// scratchpad controller on three rings (unactivated requests, activated
// requests, responses).  Ring order: client 0, client 1, ..., client N-1,
// controller, back to client 0; client i has node id i, the controller has
// id N_CLIENTS.  The controller's two backing stores -- the owner-bit store
// and the data store, private scratchpads of the surrounding memory system
// -- are reached through the own_* and dat_* ports.
// Lock group: LOCK_NODES lock nodes on a request ring and a response ring;
// node 0 is the master and starts owning all LOCK_NUM locks.
// Barrier group: BAR_NODES barrier nodes on one ring; node 0 is the master.
// The three services are independent of each other; a user design connects
// its processing engines to a client, a lock node and a barrier node each.
module leap_top
  import leap_pkg::*;
#(
  parameter int N_CLIENTS     = 3,
  parameter int CLIENT_W      = 64,
  parameter int CACHE_ENTRIES = 1024,
  parameter int MSHR_SETS     = 32,
  parameter int CT_ENTRIES    = 8,
  parameter int WSHR_ENTRIES  = 8,
  parameter int LOCK_NODES    = 4,
  parameter int LOCK_NUM      = 1,
  parameter int BAR_NODES     = 2,
  localparam int CADDR_W = ADDR_W + $clog2(DATA_W / CLIENT_W),
  localparam int LID_W   = (LOCK_NUM > 1) ? $clog2(LOCK_NUM) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // coherent scratchpad clients
  input  logic     [N_CLIENTS-1:0]   creq_valid,
  output logic     [N_CLIENTS-1:0]   creq_ready,
  input  op_kind_e                   creq_op    [N_CLIENTS],
  input  logic     [CADDR_W-1:0]     creq_addr  [N_CLIENTS],
  input  logic     [CLIENT_W-1:0]    creq_wdata [N_CLIENTS],
  output logic     [N_CLIENTS-1:0]   crsp_valid,
  output logic     [CLIENT_W-1:0]    crsp_data  [N_CLIENTS],
  output logic     [N_CLIENTS-1:0]   request_pending,
  // owner-bit private scratchpad
  output logic                       own_req_valid,
  input  logic                       own_req_ready,
  output logic                       own_req_write,
  output addr_t                      own_req_addr,
  output logic                       own_req_wdata,
  input  logic                       own_rsp_valid,
  input  logic                       own_rsp_data,
  // data private scratchpad
  output logic                       dat_req_valid,
  input  logic                       dat_req_ready,
  output logic                       dat_req_write,
  output addr_t                      dat_req_addr,
  output data_t                      dat_req_wdata,
  input  logic                       dat_rsp_valid,
  input  data_t                      dat_rsp_data,
  output logic                       ctrl_idle,
  // lock nodes
  input  logic     [LOCK_NODES-1:0]  acq_valid,
  input  logic     [LID_W-1:0]       acq_id     [LOCK_NODES],
  output logic     [LOCK_NODES-1:0]  acq_ready,
  output logic     [LOCK_NODES-1:0]  grant_valid,
  output logic     [LID_W-1:0]       grant_id   [LOCK_NODES],
  input  logic     [LOCK_NODES-1:0]  rel_valid,
  input  logic     [LID_W-1:0]       rel_id     [LOCK_NODES],
  output logic     [LOCK_NODES-1:0]  rel_ready,
  // barrier nodes
  output logic     [BAR_NODES-1:0]   bar_initialized,
  input  logic                       bar_set_valid,
  input  logic     [BAR_NODES-1:0]   bar_set_mask,
  output logic                       bar_set_ready,
  input  logic     [BAR_NODES-1:0]   bar_reached_valid,
  output logic     [BAR_NODES-1:0]   bar_reached_ready,
  output logic     [BAR_NODES-1:0]   bar_sync_valid
);
  localparam int NR = N_CLIENTS + 1;      // coherence ring nodes
  localparam int CTRL_ID = N_CLIENTS;

  // ---------------- coherence rings ----------------
  // link k runs from node k to node (k+1) mod NR
  logic     ur_v [NR], ur_r [NR], ar_v [NR], ar_r [NR], rr_v [NR], rr_r [NR];
  coh_req_t ur_d [NR], ar_d [NR];
  coh_rsp_t rr_d [NR];

  for (genvar i = 0; i < N_CLIENTS; i++) begin : g_client
    localparam int P = (i == 0) ? NR - 1 : i - 1;   // incoming link
    coh_client #(
      .MY_ID(i), .CTRL_ID(CTRL_ID), .CLIENT_W(CLIENT_W), .CACHE_ENTRIES(CACHE_ENTRIES),
      .MSHR_SETS(MSHR_SETS), .CT_ENTRIES(CT_ENTRIES), .FWD_DEPTH(N_CLIENTS)
    ) u_client (
      .clk, .rst_n,
      .creq_valid(creq_valid[i]), .creq_ready(creq_ready[i]), .creq_op(creq_op[i]),
      .creq_addr(creq_addr[i]), .creq_wdata(creq_wdata[i]),
      .crsp_valid(crsp_valid[i]), .crsp_data(crsp_data[i]),
      .request_pending(request_pending[i]),
      .ur_in_valid(ur_v[P]), .ur_in_data(ur_d[P]), .ur_in_ready(ur_r[P]),
      .ur_out_valid(ur_v[i]), .ur_out_data(ur_d[i]), .ur_out_ready(ur_r[i]),
      .ar_in_valid(ar_v[P]), .ar_in_data(ar_d[P]), .ar_in_ready(ar_r[P]),
      .ar_out_valid(ar_v[i]), .ar_out_data(ar_d[i]), .ar_out_ready(ar_r[i]),
      .rr_in_valid(rr_v[P]), .rr_in_data(rr_d[P]), .rr_in_ready(rr_r[P]),
      .rr_out_valid(rr_v[i]), .rr_out_data(rr_d[i]), .rr_out_ready(rr_r[i])
    );
  end

  coh_controller #(.CTRL_ID(CTRL_ID), .WSHR_ENTRIES(WSHR_ENTRIES)) u_ctrl (
    .clk, .rst_n,
    .ur_in_valid(ur_v[NR-2]), .ur_in_data(ur_d[NR-2]), .ur_in_ready(ur_r[NR-2]),
    .ur_out_valid(ur_v[NR-1]), .ur_out_data(ur_d[NR-1]), .ur_out_ready(ur_r[NR-1]),
    .ar_in_valid(ar_v[NR-2]), .ar_in_data(ar_d[NR-2]), .ar_in_ready(ar_r[NR-2]),
    .ar_out_valid(ar_v[NR-1]), .ar_out_data(ar_d[NR-1]), .ar_out_ready(ar_r[NR-1]),
    .rr_in_valid(rr_v[NR-2]), .rr_in_data(rr_d[NR-2]), .rr_in_ready(rr_r[NR-2]),
    .rr_out_valid(rr_v[NR-1]), .rr_out_data(rr_d[NR-1]), .rr_out_ready(rr_r[NR-1]),
    .own_req_valid, .own_req_ready, .own_req_write, .own_req_addr, .own_req_wdata,
    .own_rsp_valid, .own_rsp_data,
    .dat_req_valid, .dat_req_ready, .dat_req_write, .dat_req_addr, .dat_req_wdata,
    .dat_rsp_valid, .dat_rsp_data,
    .idle(ctrl_idle)
  );

  // ---------------- lock group ----------------
  localparam int LNID_W = (LOCK_NODES > 1) ? $clog2(LOCK_NODES) : 1;
  localparam int LMW    = LID_W + LNID_W;
  logic           lq_v [LOCK_NODES], lq_r [LOCK_NODES], ls_v [LOCK_NODES], ls_r [LOCK_NODES];
  logic [LMW-1:0] lq_d [LOCK_NODES], ls_d [LOCK_NODES];

  for (genvar i = 0; i < LOCK_NODES; i++) begin : g_lock
    localparam int P = (i == 0) ? LOCK_NODES - 1 : i - 1;
    lock_node #(
      .N_NODES(LOCK_NODES), .LOCK_NUM(LOCK_NUM), .MY_ID(i), .IS_MASTER(i == 0)
    ) u_lock (
      .clk, .rst_n,
      .rq_in_valid(lq_v[P]), .rq_in_data(lq_d[P]), .rq_in_ready(lq_r[P]),
      .rq_out_valid(lq_v[i]), .rq_out_data(lq_d[i]), .rq_out_ready(lq_r[i]),
      .rs_in_valid(ls_v[P]), .rs_in_data(ls_d[P]), .rs_in_ready(ls_r[P]),
      .rs_out_valid(ls_v[i]), .rs_out_data(ls_d[i]), .rs_out_ready(ls_r[i]),
      .acq_valid(acq_valid[i]), .acq_id(acq_id[i]), .acq_ready(acq_ready[i]),
      .grant_valid(grant_valid[i]), .grant_id(grant_id[i]),
      .rel_valid(rel_valid[i]), .rel_id(rel_id[i]), .rel_ready(rel_ready[i])
    );
  end

  // ---------------- barrier group ----------------
  localparam int BNID_W = (BAR_NODES > 1) ? $clog2(BAR_NODES) : 1;
  logic              bb_v [BAR_NODES], bb_r [BAR_NODES];
  logic [BNID_W+1:0] bb_d [BAR_NODES];
  logic [BAR_NODES-1:0] set_ready_n;

  for (genvar i = 0; i < BAR_NODES; i++) begin : g_bar
    localparam int P = (i == 0) ? BAR_NODES - 1 : i - 1;
    barrier_node #(
      .N_NODES(BAR_NODES), .MY_ID(i), .IS_MASTER(i == 0), .MASTER_ID(0)
    ) u_bar (
      .clk, .rst_n,
      .in_valid(bb_v[P]), .in_data(bb_d[P]), .in_ready(bb_r[P]),
      .out_valid(bb_v[i]), .out_data(bb_d[i]), .out_ready(bb_r[i]),
      .initialized(bar_initialized[i]),
      .set_valid((i == 0) ? bar_set_valid : 1'b0), .set_mask(bar_set_mask),
      .set_ready(set_ready_n[i]),
      .reached_valid(bar_reached_valid[i]), .reached_ready(bar_reached_ready[i]),
      .sync_valid(bar_sync_valid[i])
    );
  end
  assign bar_set_ready = set_ready_n[0];
endmodule
