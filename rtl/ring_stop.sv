// ring_stop: one stop of a unidirectional ring network.
//
// Every coherence, lock and barrier ring in this design is a chain of these
// stops.  A message arriving from the previous stop is, as decided by the
// owner of the stop through `in_for_me` / `in_pass`:
//   * ejected to the local node         (for_me=1, pass=0)
//   * forwarded to the next stop        (for_me=0, pass=1)
//   * both, for broadcasts              (for_me=1, pass=1)
//   * dropped, e.g. a broadcast that returned to its origin (both 0).
// A two-entry buffer drives the link to the next stop, so every link is
// registered and no ready signal runs combinationally around the ring.
// Through traffic has priority over local injection: a message already on
// the ring never waits for a new one.  A broadcast moves only when both the
// local node and the next stop can take it.
// Interfaces are valid/ready; a word moves when both are high.
module ring_stop #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // from previous stop
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  input  logic         in_for_me,
  input  logic         in_pass,
  // to next stop
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready,
  // local injection
  input  logic         inj_valid,
  input  logic [W-1:0] inj_data,
  output logic         inj_ready,
  // local ejection
  output logic         ej_valid,
  output logic [W-1:0] ej_data,
  input  logic         ej_ready
);
  logic       fifo_full, fifo_empty, push, pop;
  logic [W-1:0] push_data;
  logic [1:0] fifo_count;

  assign in_ready  = (!in_for_me || ej_ready) && (!in_pass || !fifo_full);
  assign ej_valid  = in_valid && in_for_me && (!in_pass || !fifo_full);
  assign ej_data   = in_data;

  // through traffic first, then local injection
  assign inj_ready = !fifo_full && !(in_valid && in_pass);
  assign push      = (in_valid && in_pass && in_ready) || (inj_valid && inj_ready);
  assign push_data = (in_valid && in_pass) ? in_data : inj_data;

  assign out_valid = !fifo_empty;
  assign pop       = out_valid && out_ready;

  sync_fifo #(.W(W), .DEPTH(2)) u_buf (
    .clk, .rst_n,
    .push, .wr_data(push_data),
    .pop,  .rd_data(out_data),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );
endmodule
