// coh_router: attaches one coherent cache to the three coherence rings.
//
// Three ring stops, one per message class, plus the completion table:
//   * unactivated request ring: the cache's GETS/GETM/PUTM are injected and
//     travel to the controller; this stop only passes foreign traffic on.
//   * activated request ring: a broadcast from the ordering point; every
//     message is copied into the completion table and passed on.
//   * response ring: messages whose destination is this node are ejected to
//     the cache (data responses are always accepted); the completion table
//     injects the cache's responses.
// All ring links are valid/ready and registered inside ring_stop.
module coh_router
  import leap_pkg::*;
#(
  parameter int MY_ID      = 0,
  parameter int CTRL_ID    = 3,
  parameter int CT_ENTRIES = 8,
  parameter int CT_IDX_W   = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // unactivated request ring
  input  logic       ur_in_valid,
  input  coh_req_t   ur_in_data,
  output logic       ur_in_ready,
  output logic       ur_out_valid,
  output coh_req_t   ur_out_data,
  input  logic       ur_out_ready,
  // activated request ring
  input  logic       ar_in_valid,
  input  coh_req_t   ar_in_data,
  output logic       ar_in_ready,
  output logic       ar_out_valid,
  output coh_req_t   ar_out_data,
  input  logic       ar_out_ready,
  // response ring
  input  logic       rr_in_valid,
  input  coh_rsp_t   rr_in_data,
  output logic       rr_in_ready,
  output logic       rr_out_valid,
  output coh_rsp_t   rr_out_data,
  input  logic       rr_out_ready,
  // cache side
  input  logic       ureq_valid,
  input  coh_req_t   ureq_data,
  output logic       ureq_ready,
  output logic       snp_valid,
  output coh_req_t   snp_req,
  output logic [CT_IDX_W-1:0] snp_idx,
  input  logic       snp_ready,
  input  logic       cmp_valid,
  input  logic [CT_IDX_W-1:0] cmp_idx,
  input  logic       cmp_send,
  input  rsp_kind_e  cmp_kind,
  input  data_t      cmp_data,
  input  logic       cmp_dirty,
  output logic       cmp_ready,
  output logic       drsp_valid,
  output coh_rsp_t   drsp,
  output logic       idle         // no snoop in flight
);
  localparam int RQW = $bits(coh_req_t);
  localparam int RSW = $bits(coh_rsp_t);

  // unactivated requests: pass foreign ones, inject ours
  logic           ur_ej_valid;
  logic [RQW-1:0] ur_ej_data;
  ring_stop #(.W(RQW)) u_ur (
    .clk, .rst_n,
    .in_valid(ur_in_valid), .in_data(ur_in_data), .in_ready(ur_in_ready),
    .in_for_me(1'b0), .in_pass(1'b1),
    .out_valid(ur_out_valid), .out_data(ur_out_data), .out_ready(ur_out_ready),
    .inj_valid(ureq_valid), .inj_data(ureq_data), .inj_ready(ureq_ready),
    .ej_valid(ur_ej_valid), .ej_data(ur_ej_data), .ej_ready(1'b1)
  );

  // activated requests: copy to the completion table and pass on
  logic           ar_ej_valid, ar_ej_ready, ar_inj_ready;
  logic [RQW-1:0] ar_ej_data;
  ring_stop #(.W(RQW)) u_ar (
    .clk, .rst_n,
    .in_valid(ar_in_valid), .in_data(ar_in_data), .in_ready(ar_in_ready),
    .in_for_me(1'b1), .in_pass(1'b1),
    .out_valid(ar_out_valid), .out_data(ar_out_data), .out_ready(ar_out_ready),
    .inj_valid(1'b0), .inj_data('0), .inj_ready(ar_inj_ready),
    .ej_valid(ar_ej_valid), .ej_data(ar_ej_data), .ej_ready(ar_ej_ready)
  );

  // responses
  logic     ct_rsp_valid, ct_rsp_ready, ct_empty, rr_ej_valid;
  coh_rsp_t ct_rsp, rr_ej_data;
  logic     rr_for_me;
  assign rr_for_me = (rr_in_data.dest == node_t'(MY_ID));
  ring_stop #(.W(RSW)) u_rr (
    .clk, .rst_n,
    .in_valid(rr_in_valid), .in_data(rr_in_data), .in_ready(rr_in_ready),
    .in_for_me(rr_for_me), .in_pass(!rr_for_me),
    .out_valid(rr_out_valid), .out_data(rr_out_data), .out_ready(rr_out_ready),
    .inj_valid(ct_rsp_valid), .inj_data(ct_rsp), .inj_ready(ct_rsp_ready),
    .ej_valid(rr_ej_valid), .ej_data(rr_ej_data), .ej_ready(1'b1)
  );
  assign drsp_valid = rr_ej_valid;
  assign drsp       = rr_ej_data;

  completion_table #(.MY_ID(MY_ID), .CTRL_ID(CTRL_ID), .ENTRIES(CT_ENTRIES), .IDX_W(CT_IDX_W)) u_ct (
    .clk, .rst_n,
    .in_valid(ar_ej_valid), .in_req(ar_ej_data), .in_ready(ar_ej_ready),
    .snp_valid, .snp_req, .snp_idx, .snp_ready,
    .cmp_valid, .cmp_idx, .cmp_send, .cmp_kind, .cmp_data, .cmp_dirty, .cmp_ready,
    .rsp_valid(ct_rsp_valid), .rsp_data(ct_rsp), .rsp_ready(ct_rsp_ready),
    .empty(ct_empty)
  );

  assign idle = ct_empty;

  a_no_foreign_unact_eject: assert property (@(posedge clk) disable iff (!rst_n) !ur_ej_valid);
endmodule
