// leap_pkg: types and constants shared by the coherent scratchpad domain,
// the lock service and the barrier service.
//
// Widths follow the evaluated configuration: 64-bit data words (one word per
// cache line) and a 14-bit word address (a 128 KB shared space).  Node ids
// are 4 bits, enough for 15 coherent clients plus the controller.
//
// Three message classes travel on three independent rings, so no message
// class can block another:
//   * unactivated requests : client -> controller (the ordering point)
//   * activated requests   : controller -> every client (broadcast, in order)
//   * responses            : point to point, data or write-back traffic
package leap_pkg;

  localparam int ADDR_W = 14;   // word address
  localparam int DATA_W = 64;   // cache line / data word
  localparam int NODE_W = 4;    // ring node id

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [NODE_W-1:0] node_t;

  // MOSI steady states kept in the cache arrays.
  typedef enum logic [1:0] {
    ST_I = 2'd0,
    ST_S = 2'd1,
    ST_O = 2'd2,
    ST_M = 2'd3
  } coh_state_e;

  // Coherence request kinds (unactivated and activated rings).
  typedef enum logic [1:0] {
    REQ_GETS = 2'd0,   // read miss
    REQ_GETM = 2'd1,   // write miss / upgrade
    REQ_PUTM = 2'd2    // write-back of an owned line
  } req_kind_e;

  typedef struct packed {
    req_kind_e kind;
    node_t     src;
    addr_t     addr;
  } coh_req_t;

  // Response kinds (response ring).
  typedef enum logic [1:0] {
    RSP_DATA     = 2'd0,  // data for a GETS/GETM
    RSP_WB       = 2'd1,  // write-back data/ownership to the controller
    RSP_WBCANCEL = 2'd2   // write-back lost its ownership before activation
  } rsp_kind_e;

  typedef struct packed {
    rsp_kind_e kind;
    node_t     dest;
    node_t     src;
    addr_t     addr;
    logic      excl;   // data comes from memory: requester becomes M
    logic      dirty;  // data differs from memory
    data_t     data;
  } coh_rsp_t;

  // Local request kinds at the client interface.
  typedef enum logic [2:0] {
    OP_READ       = 3'd0,
    OP_WRITE      = 3'd1,
    OP_FENCE_RD   = 3'd2,
    OP_FENCE_WR   = 3'd3,
    OP_FENCE_FULL = 3'd4
  } op_kind_e;

  // Lock table states.
  typedef enum logic [1:0] {
    LK_N = 2'd0,   // not own
    LK_W = 2'd1,   // wait response
    LK_U = 2'd2,   // in use
    LK_O = 2'd3    // own and idle
  } lock_state_e;

  // Barrier ring messages.
  typedef enum logic [1:0] {
    BAR_INIT    = 2'd0,
    BAR_REACHED = 2'd1,
    BAR_DONE    = 2'd2
  } bar_kind_e;

endpackage
