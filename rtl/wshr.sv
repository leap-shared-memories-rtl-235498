// wshr: write-back status handling registers of the coherence controller.
//
// A write-back is split in two: the PUTM request travels through the
// ordering point, the data (or a cancel) follows later on the response ring.
// Between the two, an entry here records the address and the client that
// writes back.  Reads of that address ordered in between are put on the
// entry's forwarding list and answered once the data has arrived.  Only the
// first forwarded request is ever answered by memory -- it becomes the new
// owner and answers the later ones itself -- so the list keeps just that one
// requester.  At most one entry exists per address (the controller holds a
// second PUTM to the same address back until the first completes), so the
// address lookup is a plain match.
// Lookups are combinational; allocate, record and free are synchronous.
module wshr
  import leap_pkg::*;
#(
  parameter int ENTRIES = 8,
  parameter int IDX_W   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  addr_t            q_addr,
  output logic             q_hit,
  output logic [IDX_W-1:0] q_idx,
  output node_t            q_src,        // client writing back
  output logic             q_fwd_valid,
  output node_t            q_fwd_src,
  output logic             full,
  input  logic             alloc,
  input  node_t            alloc_src,    // entry takes q_addr
  input  logic             set_fwd,      // record a requester on entry q_idx
  input  node_t            fwd_src,
  input  logic             free,         // release entry q_idx
  output logic             empty
);
  logic  v       [ENTRIES];
  addr_t e_addr  [ENTRIES];
  node_t e_src   [ENTRIES];
  logic  e_fwd   [ENTRIES];
  node_t e_fsrc  [ENTRIES];

  logic [IDX_W-1:0] free_idx;
  always_comb begin
    q_hit = 1'b0; q_idx = '0;
    full = 1'b1; free_idx = '0; empty = 1'b1;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (v[i] && e_addr[i] == q_addr) begin
        q_hit = 1'b1;
        q_idx = IDX_W'(i);
      end
      if (!v[i]) begin
        full     = 1'b0;
        free_idx = IDX_W'(i);
      end else begin
        empty = 1'b0;
      end
    end
  end
  assign q_src       = e_src[q_idx];
  assign q_fwd_valid = e_fwd[q_idx];
  assign q_fwd_src   = e_fsrc[q_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        v[i]     <= 1'b0;
        e_fwd[i] <= 1'b0;
      end
    end else begin
      if (free) v[q_idx] <= 1'b0;
      if (set_fwd && !e_fwd[q_idx]) e_fwd[q_idx] <= 1'b1;
      if (alloc) begin
        v[free_idx]     <= 1'b1;
        e_fwd[free_idx] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      e_addr[free_idx] <= q_addr;
      e_src[free_idx]  <= alloc_src;
    end
    if (set_fwd && !e_fwd[q_idx]) e_fsrc[q_idx] <= fwd_src;
  end

  a_alloc_ok: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> (!full && !q_hit));
  a_use_hit:  assert property (@(posedge clk) disable iff (!rst_n) (set_fwd || free) |-> q_hit);
endmodule
