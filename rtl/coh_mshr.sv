// coh_mshr: miss status handling registers of one coherent cache.
//
// The cache keeps only steady MOSI states; every transient state lives here.
// The table has WB_SETS sets indexed by the low address bits, and each set
// has two ways: a miss way and a write-back way.
//   * Write-back way: an owned (M/O) line that was evicted.  It keeps data,
//     dirty bit and an `owner` flag until the cache sees its own write-back
//     request come back activated from the ordering point.  Until then it
//     still answers snoops as the owner; a foreign GETM takes the ownership
//     away (owner flag cleared) and the later write-back is cancelled.
//   * Miss way: the outstanding GETS/GETM.  It records whether the request
//     has been activated (ordered) and whether data has arrived, and keeps the
//     forwarding list: foreign snoops to the same address that were ordered
//     after this request, to be answered once the local access completes.
// The cache allows one outstanding miss at a time, so only one miss way is
// ever valid; it is held in a single register set rather than WB_SETS
// copies.  The forwarding list is a FIFO of FWD_DEPTH entries.
// All updates are synchronous; lookups are combinational.
module coh_mshr
  import leap_pkg::*;
#(
  parameter int WB_SETS   = 32,
  parameter int FWD_DEPTH = 4,
  parameter int FWD_W     = 5    // width of one forwarding-list entry
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---- write-back ways ----
  input  addr_t            wb_alloc_addr,   // victim address (also checked for a free way)
  output logic             wb_alloc_busy,   // the victim's set already holds a write-back
  input  logic             wb_alloc,
  input  data_t            wb_alloc_data,
  input  logic             wb_alloc_dirty,
  input  addr_t            wb_q_addr,       // snoop lookup
  output logic             wb_q_hit,
  output logic             wb_q_owner,
  output data_t            wb_q_data,
  output logic             wb_q_dirty,
  input  logic             wb_clear_owner,  // on the set of wb_q_addr
  input  logic             wb_free,         // on the set of wb_q_addr
  // ---- miss way ----
  input  logic             miss_alloc,
  input  addr_t            miss_alloc_addr,
  input  logic             miss_alloc_write,
  input  logic             miss_set_active,
  input  logic             miss_set_local,  // upgrade completes with the line's own data
  input  logic             miss_set_data,
  input  data_t            miss_rsp_data,
  input  logic             miss_rsp_excl,
  input  logic             miss_set_putm,   // a foreign write-back was ordered after us
  input  logic             miss_free,
  output logic             miss_valid,
  output addr_t            miss_addr,
  output logic             miss_write,
  output logic             miss_active,
  output logic             miss_local,
  output logic             miss_got_data,
  output data_t            miss_data,
  output logic             miss_excl,
  output logic             miss_putm,
  // ---- forwarding list ----
  input  logic             fwd_push,
  input  logic [FWD_W-1:0] fwd_push_data,
  input  logic             fwd_pop,
  output logic [FWD_W-1:0] fwd_head,
  output logic             fwd_empty,
  output logic             fwd_full
);
  localparam int SW = (WB_SETS > 1) ? $clog2(WB_SETS) : 1;

  logic  wb_v     [WB_SETS];
  logic  wb_own   [WB_SETS];
  logic  wb_dty   [WB_SETS];
  addr_t wb_addr  [WB_SETS];
  data_t wb_data  [WB_SETS];

  logic [SW-1:0] a_set, q_set;
  assign a_set = wb_alloc_addr[SW-1:0];
  assign q_set = wb_q_addr[SW-1:0];

  assign wb_alloc_busy = wb_v[a_set];
  assign wb_q_hit      = wb_v[q_set] && (wb_addr[q_set] == wb_q_addr);
  assign wb_q_owner    = wb_own[q_set];
  assign wb_q_data     = wb_data[q_set];
  assign wb_q_dirty    = wb_dty[q_set];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WB_SETS; i++) begin
        wb_v[i]   <= 1'b0;
        wb_own[i] <= 1'b0;
      end
    end else begin
      if (wb_free)        wb_v[q_set]   <= 1'b0;
      if (wb_clear_owner) wb_own[q_set] <= 1'b0;
      if (wb_alloc) begin
        wb_v[a_set]   <= 1'b1;
        wb_own[a_set] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wb_alloc) begin
      wb_addr[a_set] <= wb_alloc_addr;
      wb_data[a_set] <= wb_alloc_data;
      wb_dty[a_set]  <= wb_alloc_dirty;
    end
  end

  // ---- miss way ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_valid    <= 1'b0;
      miss_active   <= 1'b0;
      miss_local    <= 1'b0;
      miss_got_data <= 1'b0;
      miss_putm     <= 1'b0;
      miss_write    <= 1'b0;
      miss_excl     <= 1'b0;
      miss_addr     <= '0;
      miss_data     <= '0;
    end else begin
      if (miss_free) begin
        miss_valid <= 1'b0;
      end
      if (miss_alloc) begin
        miss_valid    <= 1'b1;
        miss_addr     <= miss_alloc_addr;
        miss_write    <= miss_alloc_write;
        miss_active   <= 1'b0;
        miss_local    <= 1'b0;
        miss_got_data <= 1'b0;
        miss_putm     <= 1'b0;
      end
      if (miss_set_active) miss_active <= 1'b1;
      if (miss_set_local)  miss_local  <= 1'b1;
      if (miss_set_putm)   miss_putm   <= 1'b1;
      if (miss_set_data) begin
        miss_got_data <= 1'b1;
        miss_data     <= miss_rsp_data;
        miss_excl     <= miss_rsp_excl;
      end
    end
  end

  logic [$clog2(FWD_DEPTH+1)-1:0] fwd_count;
  sync_fifo #(.W(FWD_W), .DEPTH(FWD_DEPTH)) u_fwd (
    .clk, .rst_n,
    .push(fwd_push), .wr_data(fwd_push_data),
    .pop(fwd_pop),   .rd_data(fwd_head),
    .full(fwd_full), .empty(fwd_empty), .count(fwd_count)
  );

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) wb_alloc |-> !wb_v[a_set]);
  a_one_miss:   assert property (@(posedge clk) disable iff (!rst_n) miss_alloc |-> !miss_valid);
endmodule
