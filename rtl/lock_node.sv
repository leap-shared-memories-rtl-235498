// lock_node: one node of a distributed lock group.
//
// The nodes of a lock group sit on two rings: a request ring, on which lock
// requests circulate, and a response ring, which carries a lock to the node
// it is granted to.  Each node keeps a lock table with, per lock, a 2-bit
// state and a forwarding id:
//   N  not own      W  waiting for the lock      U  in use      O  own, idle
// The master node starts owning every lock (O); the others start in N.
// Transitions:
//   N -> W    local acquire: a request {lock, me} is sent on the request ring
//   W -> U    the lock arrives on the response ring; the client is granted
//   U -> O    local release
//   O -> N    the lock is sent on: to the recorded forwarding id, or to the
//             requester of a request that reaches an idle owner
//   O -> U    local acquire of a lock the node owns and is not using
// A request arriving at a node is consumed when the node owns the lock idle
// (grant), when the node uses the lock and has no forwarding id yet, or
// when the node itself waits for the lock, has no forwarding id yet and the
// requester's id is lower than its own.  Otherwise it is passed on and keeps
// circling.  The id rule stops waiting nodes from recording each other in a
// cycle; the U rule ends every chain of recorded requesters at the lock.
// One table update happens per cycle.  Interface: acquire and release are
// valid/ready; `grant_valid` is a one-cycle strobe with the lock id.
module lock_node #(
  parameter int N_NODES   = 4,
  parameter int LOCK_NUM  = 1,
  parameter int MY_ID     = 0,
  parameter bit IS_MASTER = 1'b0,
  parameter int LID_W     = (LOCK_NUM > 1) ? $clog2(LOCK_NUM) : 1,
  parameter int NID_W     = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // request ring: {lock id, requester id}
  input  logic             rq_in_valid,
  input  logic [LID_W+NID_W-1:0] rq_in_data,
  output logic             rq_in_ready,
  output logic             rq_out_valid,
  output logic [LID_W+NID_W-1:0] rq_out_data,
  input  logic             rq_out_ready,
  // response ring: {lock id, destination id}
  input  logic             rs_in_valid,
  input  logic [LID_W+NID_W-1:0] rs_in_data,
  output logic             rs_in_ready,
  output logic             rs_out_valid,
  output logic [LID_W+NID_W-1:0] rs_out_data,
  input  logic             rs_out_ready,
  // client interface
  input  logic             acq_valid,
  input  logic [LID_W-1:0] acq_id,
  output logic             acq_ready,
  output logic             grant_valid,
  output logic [LID_W-1:0] grant_id,
  input  logic             rel_valid,
  input  logic [LID_W-1:0] rel_id,
  output logic             rel_ready
);
  import leap_pkg::*;
  localparam int MW = LID_W + NID_W;
  typedef logic [NID_W-1:0] nid_t;
  typedef logic [LID_W-1:0] lid_t;

  lock_state_e st  [LOCK_NUM];
  logic        fwv [LOCK_NUM];
  nid_t        fwd [LOCK_NUM];

  // incoming request
  lid_t rq_lid;
  nid_t rq_src;
  assign {rq_lid, rq_src} = rq_in_data;
  logic rq_take;
  always_comb begin
    rq_take = 1'b0;
    if (rq_src != nid_t'(MY_ID)) begin
      unique case (st[rq_lid])
        LK_O:    rq_take = 1'b1;
        LK_U:    rq_take = !fwv[rq_lid];
        LK_W:    rq_take = !fwv[rq_lid] && (rq_src < nid_t'(MY_ID));
        default: rq_take = 1'b0;
      endcase
    end
  end

  // incoming response
  lid_t rs_lid;
  nid_t rs_dst;
  assign {rs_lid, rs_dst} = rs_in_data;
  logic rs_mine;
  assign rs_mine = (rs_dst == nid_t'(MY_ID));

  // an idle owned lock with a recorded requester
  logic fw_go;
  lid_t fw_lid;
  always_comb begin
    fw_go = 1'b0; fw_lid = '0;
    for (int i = LOCK_NUM - 1; i >= 0; i--)
      if (st[i] == LK_O && fwv[i]) begin
        fw_go  = 1'b1;
        fw_lid = lid_t'(i);
      end
  end

  logic rq_ej_valid, rq_ej_ready, rs_ej_valid, rs_ej_ready;
  logic [MW-1:0] rq_ej_data, rs_ej_data;
  logic rq_inj_valid, rq_inj_ready, rs_inj_valid, rs_inj_ready;
  logic [MW-1:0] rs_inj_data;

  ring_stop #(.W(MW)) u_rq (
    .clk, .rst_n,
    .in_valid(rq_in_valid), .in_data(rq_in_data), .in_ready(rq_in_ready),
    .in_for_me(rq_take), .in_pass(!rq_take),
    .out_valid(rq_out_valid), .out_data(rq_out_data), .out_ready(rq_out_ready),
    .inj_valid(rq_inj_valid), .inj_data({acq_id, nid_t'(MY_ID)}), .inj_ready(rq_inj_ready),
    .ej_valid(rq_ej_valid), .ej_data(rq_ej_data), .ej_ready(rq_ej_ready)
  );

  ring_stop #(.W(MW)) u_rs (
    .clk, .rst_n,
    .in_valid(rs_in_valid), .in_data(rs_in_data), .in_ready(rs_in_ready),
    .in_for_me(rs_mine), .in_pass(!rs_mine),
    .out_valid(rs_out_valid), .out_data(rs_out_data), .out_ready(rs_out_ready),
    .inj_valid(rs_inj_valid), .inj_data(rs_inj_data), .inj_ready(rs_inj_ready),
    .ej_valid(rs_ej_valid), .ej_data(rs_ej_data), .ej_ready(rs_ej_ready)
  );

  // one action per cycle, in priority order
  typedef enum logic [2:0] {A_NONE, A_GRANT, A_FWD, A_REQ, A_REL, A_ACQ} act_e;
  act_e act;
  always_comb begin
    act = A_NONE;
    rs_ej_ready = 1'b0; rq_ej_ready = 1'b0;
    rs_inj_valid = 1'b0; rs_inj_data = '0; rq_inj_valid = 1'b0;
    acq_ready = 1'b0; rel_ready = 1'b0;
    if (rs_ej_valid) begin
      act = A_GRANT;
      rs_ej_ready = 1'b1;
    end else if (fw_go) begin
      rs_inj_valid = 1'b1;
      rs_inj_data  = {fw_lid, fwd[fw_lid]};
      if (rs_inj_ready) act = A_FWD;
    end else if (rq_ej_valid) begin
      if (st[rq_lid] == LK_O) begin
        rs_inj_valid = 1'b1;
        rs_inj_data  = {rq_lid, rq_src};
        if (rs_inj_ready) begin
          act = A_REQ;
          rq_ej_ready = 1'b1;
        end
      end else begin
        act = A_REQ;
        rq_ej_ready = 1'b1;
      end
    end else if (rel_valid) begin
      rel_ready = 1'b1;
      act = A_REL;
    end else if (acq_valid) begin
      if (st[acq_id] == LK_O) begin
        acq_ready = 1'b1;
        act = A_ACQ;
      end else if (st[acq_id] == LK_N) begin
        rq_inj_valid = 1'b1;
        if (rq_inj_ready) begin
          acq_ready = 1'b1;
          act = A_ACQ;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LOCK_NUM; i++) begin
        st[i]  <= IS_MASTER ? LK_O : LK_N;
        fwv[i] <= 1'b0;
        fwd[i] <= '0;
      end
      grant_valid <= 1'b0;
      grant_id    <= '0;
    end else begin
      grant_valid <= 1'b0;
      unique case (act)
        A_GRANT: begin
          st[rs_lid]  <= LK_U;
          grant_valid <= 1'b1;
          grant_id    <= rs_lid;
        end
        A_FWD: begin
          st[fw_lid]  <= LK_N;
          fwv[fw_lid] <= 1'b0;
        end
        A_REQ: begin
          if (st[rq_lid] == LK_O) begin
            st[rq_lid] <= LK_N;
          end else begin
            fwv[rq_lid] <= 1'b1;
            fwd[rq_lid] <= rq_src;
          end
        end
        A_REL: begin
          if (st[rel_id] == LK_U) st[rel_id] <= LK_O;
        end
        A_ACQ: begin
          if (st[acq_id] == LK_O) begin
            st[acq_id]  <= LK_U;
            grant_valid <= 1'b1;
            grant_id    <= acq_id;
          end else begin
            st[acq_id] <= LK_W;
          end
        end
        default: ;
      endcase
    end
  end

  a_grant_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    act == A_GRANT |-> st[rs_lid] == LK_W);
endmodule
