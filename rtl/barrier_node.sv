// barrier_node: one node of a centralised barrier group on a ring.
//
// One node of the group is the master.  It holds the barrier condition --
// a mask of the nodes that must arrive -- and the set of nodes that have
// arrived so far.  Messages on the ring: INIT and DONE are broadcasts from
// the master (every slave takes a copy and passes it on; the master drops
// them when they come back round), REACHED goes from a slave to the master.
//   * Master `set_valid`: store the mask, broadcast INIT; the master is then
//     initialized.  A slave becomes initialized when INIT reaches it.
//   * `reached_valid` (barrierReached): a slave sends REACHED; the master
//     marks itself.  Accepted only once initialized.
//   * When every masked node has arrived the master broadcasts DONE, clears
//     the arrival set and raises its own `sync_valid`; a slave raises
//     `sync_valid` (waitForSync completes) when DONE reaches it.
// The mask stays set, so the same barrier serves every following round.
// Interface: set/reached are valid/ready; sync_valid is a one-cycle strobe.
module barrier_node #(
  parameter int N_NODES   = 2,
  parameter int MY_ID     = 0,
  parameter bit IS_MASTER = 1'b0,
  parameter int MASTER_ID = 0,
  parameter int NID_W     = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // ring: {kind, source id}
  input  logic               in_valid,
  input  logic [NID_W+1:0]   in_data,
  output logic               in_ready,
  output logic               out_valid,
  output logic [NID_W+1:0]   out_data,
  input  logic               out_ready,
  // client interface
  output logic               initialized,
  input  logic               set_valid,      // master only (setBarrier)
  input  logic [N_NODES-1:0] set_mask,
  output logic               set_ready,
  input  logic               reached_valid,  // barrierReached
  output logic               reached_ready,
  output logic               sync_valid      // waitForSync completes
);
  import leap_pkg::*;
  localparam int MW = NID_W + 2;
  typedef logic [NID_W-1:0] nid_t;

  bar_kind_e in_kind;
  nid_t      in_src;
  assign in_kind = bar_kind_e'(in_data[MW-1:NID_W]);
  assign in_src  = in_data[NID_W-1:0];

  logic for_me, pass;
  always_comb begin
    if (IS_MASTER) begin
      for_me = (in_kind == BAR_REACHED);
      pass   = 1'b0;                        // own broadcasts end here
    end else begin
      for_me = (in_kind != BAR_REACHED);
      pass   = 1'b1;
    end
  end

  logic             ej_valid, inj_valid, inj_ready;
  logic [MW-1:0]    ej_data, inj_data;
  ring_stop #(.W(MW)) u_stop (
    .clk, .rst_n,
    .in_valid, .in_data, .in_ready,
    .in_for_me(for_me), .in_pass(pass),
    .out_valid, .out_data, .out_ready,
    .inj_valid, .inj_data, .inj_ready,
    .ej_valid, .ej_data, .ej_ready(1'b1)
  );

  logic [N_NODES-1:0] mask_q, arrived_q, arrived_n;
  logic               complete;
  bar_kind_e          ej_kind;
  nid_t               ej_src;
  assign ej_kind = bar_kind_e'(ej_data[MW-1:NID_W]);
  assign ej_src  = ej_data[NID_W-1:0];

  always_comb begin
    arrived_n = arrived_q;
    if (IS_MASTER && ej_valid && ej_kind == BAR_REACHED) arrived_n[ej_src] = 1'b1;
    if (IS_MASTER && reached_valid && reached_ready)     arrived_n[MY_ID]  = 1'b1;
  end
  assign complete = IS_MASTER && initialized && (mask_q != '0) &&
                    ((arrived_q & mask_q) == mask_q);

  always_comb begin
    inj_valid = 1'b0;
    inj_data  = {BAR_INIT, nid_t'(MY_ID)};
    set_ready = 1'b0;
    reached_ready = 1'b0;
    if (IS_MASTER) begin
      if (complete) begin
        inj_valid = 1'b1;
        inj_data  = {BAR_DONE, nid_t'(MY_ID)};
      end else if (set_valid) begin
        inj_valid = 1'b1;
        set_ready = inj_ready;
      end
      reached_ready = initialized && !complete;
    end else begin
      if (reached_valid && initialized) begin
        inj_valid     = 1'b1;
        inj_data      = {BAR_REACHED, nid_t'(MY_ID)};
        reached_ready = inj_ready;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q      <= '0;
      arrived_q   <= '0;
      initialized <= 1'b0;
      sync_valid  <= 1'b0;
    end else begin
      sync_valid <= 1'b0;
      if (IS_MASTER) begin
        if (complete && inj_ready) begin
          arrived_q  <= arrived_n & ~mask_q;
          sync_valid <= 1'b1;
        end else begin
          arrived_q <= arrived_n;
        end
        if (set_valid && set_ready) begin
          mask_q      <= set_mask;
          initialized <= 1'b1;
        end
      end else if (ej_valid) begin
        if (ej_kind == BAR_INIT) initialized <= 1'b1;
        if (ej_kind == BAR_DONE) sync_valid  <= 1'b1;
      end
    end
  end

  a_master_id: assert property (@(posedge clk) disable iff (!rst_n)
    ej_valid |-> (IS_MASTER ? (ej_kind == BAR_REACHED) : (ej_src == nid_t'(MASTER_ID))));
endmodule
