// pscratch_model: behavioural model of a private scratchpad used as a
// backing store of the coherence controller (owner-bit store or data
// store).  Not synthesizable intent: a plain array with a fixed read
// latency.  Requests are always accepted; reads return in order LAT cycles
// later; writes take effect at once.  Initial contents: zero, or, with
// INIT_ADDR set, the word address in the upper half of each word.
module pscratch_model #(
  parameter int W         = 64,
  parameter int AW        = 14,
  parameter int LAT       = 4,
  parameter bit INIT_ADDR = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_write,
  input  logic [AW-1:0] req_addr,
  input  logic [W-1:0]  req_wdata,
  output logic          rsp_valid,
  output logic [W-1:0]  rsp_data
);
  logic [W-1:0] mem [2**AW];
  logic         pv [LAT];
  logic [W-1:0] pd [LAT];

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      mem[a] = '0;
      if (INIT_ADDR && W >= 64) mem[a] = W'(64'(a) << 32);
    end
  end

  assign req_ready = 1'b1;
  assign rsp_valid = pv[LAT-1];
  assign rsp_data  = pd[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        pv[i] <= 1'b0;
        pd[i] <= '0;
      end
    end else begin
      pv[0] <= req_valid && !req_write;
      pd[0] <= mem[req_addr];
      for (int i = 1; i < LAT; i++) begin
        pv[i] <= pv[i-1];
        pd[i] <= pd[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_write) mem[req_addr] <= req_wdata;
  end
endmodule
