// marshaller: adapts a client word narrower than a cache line.
//
// A client address selects a word of CLIENT_W bits; its upper bits select
// the line and its low bits the word inside the line.  Writes become
// masked line writes: the word is replicated across the line and a byte mask
// marks the bytes it covers, so the cache merges it without a separate read.
// Reads fetch the whole line; the word offset of every read in flight is
// kept in a FIFO (the cache answers reads in order) and used to pick the
// word out of the returned line.  Fences pass through unchanged.
// When CLIENT_W equals the line width there is one word per line, the mask
// is all ones and the word offset is empty.
// Timing: requests pass through combinationally (valid/ready); responses
// appear in the same cycle as the line response.
module marshaller
  import leap_pkg::*;
#(
  parameter int CLIENT_W = 64,
  parameter int RD_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // client side
  input  logic                 creq_valid,
  output logic                 creq_ready,
  input  op_kind_e             creq_op,
  input  logic [ADDR_W+$clog2(DATA_W/CLIENT_W)-1:0] creq_addr,
  input  logic [CLIENT_W-1:0]  creq_wdata,
  output logic                 crsp_valid,
  output logic [CLIENT_W-1:0]  crsp_data,
  // cache side
  output logic                 lreq_valid,
  input  logic                 lreq_ready,
  output op_kind_e             lreq_op,
  output addr_t                lreq_addr,
  output data_t                lreq_wdata,
  output logic [DATA_W/8-1:0]  lreq_wmask,
  input  logic                 lrsp_valid,
  input  data_t                lrsp_data
);
  localparam int RATIO = DATA_W / CLIENT_W;
  localparam int OFF_W = $clog2(RATIO);      // 0 when one word per line
  localparam int SEL_W = (OFF_W > 0) ? OFF_W : 1;
  localparam int WB    = CLIENT_W / 8;       // bytes per client word

  logic [SEL_W-1:0] off;
  if (OFF_W > 0) begin : g_off
    assign off       = creq_addr[OFF_W-1:0];
    assign lreq_addr = creq_addr[ADDR_W+OFF_W-1:OFF_W];
  end else begin : g_nooff
    assign off       = '0;
    assign lreq_addr = creq_addr[ADDR_W-1:0];
  end

  assign lreq_op    = creq_op;
  assign lreq_wdata = {RATIO{creq_wdata}};
  always_comb begin
    lreq_wmask = '0;
    lreq_wmask[off*WB +: WB] = '1;
  end

  // offsets of reads in flight
  logic             rd_full, rd_empty, rd_push;
  logic [SEL_W-1:0] rd_off;
  logic [$clog2(RD_DEPTH+1)-1:0] rd_count;
  assign rd_push    = creq_valid && creq_ready && creq_op == OP_READ;
  assign lreq_valid = creq_valid && !(creq_op == OP_READ && rd_full);
  assign creq_ready = lreq_ready && !(creq_op == OP_READ && rd_full);

  sync_fifo #(.W(SEL_W), .DEPTH(RD_DEPTH)) u_rd (
    .clk, .rst_n,
    .push(rd_push), .wr_data(off),
    .pop(lrsp_valid), .rd_data(rd_off),
    .full(rd_full), .empty(rd_empty), .count(rd_count)
  );

  assign crsp_valid = lrsp_valid;
  assign crsp_data  = lrsp_data[rd_off*CLIENT_W +: CLIENT_W];

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) lrsp_valid |-> !rd_empty);
endmodule
