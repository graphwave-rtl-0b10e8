// graphwave_pkg: widths, message formats, table-entry layouts and encodings shared by every
// GraphWave block.
//
// A message is a value plus a route. The route says how the value reaches its destinations:
// unicast to one VPU of the PE, multicast through one bit-masking table entry, or through one
// entry of the inter table (which fans the message out to this PE and to next-hop PEs). A packet
// is a message with the index of the destination PE, as carried by the network-on-chip.
// The three message kinds and the table names follow the GraphWave architecture; the bit widths, the field
// order and the entry formats of the inter table and the two address tables are this design's
// own, as the architecture leaves them open.
package graphwave_pkg;

  localparam int VAL_W  = 32;  // vertex value, Q16.16 for PageRank, integer for BFS/CC
  localparam int ADDR_W = 16;  // table index or VPU index
  localparam int PE_W   = 8;   // PE index
  localparam int CNT_W  = 8;   // entries per address-generator burst
  localparam int DEG_W  = 16;  // out-degree of a vertex

  localparam logic [VAL_W-1:0] VAL_INF = '1;       // "unreached" for BFS, identity of min
  localparam logic [VAL_W-1:0] FX_ONE  = 32'h0001_0000;  // 1.0 in Q16.16

  // Route kinds. K_NONE marks a vertex with no outbound edges.
  typedef enum logic [1:0] {
    K_NONE  = 2'd0,
    K_UCAST = 2'd1,   // addr = VPU index in the PE (unicast unit)
    K_MCAST = 2'd2,   // addr = bit-masking table entry
    K_INTER = 2'd3    // addr = inter table entry
  } kind_e;

  typedef enum logic [1:0] {
    ALG_PR  = 2'd0,
    ALG_BFS = 2'd1,
    ALG_CC  = 2'd2
  } alg_e;

  typedef struct packed {
    kind_e             kind;
    logic [ADDR_W-1:0] addr;
  } route_t;

  typedef struct packed {
    route_t           route;
    logic [VAL_W-1:0] val;
  } msg_t;

  typedef struct packed {
    logic [PE_W-1:0] dest;
    msg_t            msg;
  } pkt_t;

  // Inter table entry: a burst of to-PE address table entries and a burst of to-NoC address
  // table entries, both produced for the same message value.
  typedef struct packed {
    logic [ADDR_W-1:0] pe_base;
    logic [CNT_W-1:0]  pe_cnt;
    logic [ADDR_W-1:0] noc_base;
    logic [CNT_W-1:0]  noc_cnt;
  } inter_entry_t;

  // To-NoC address table entry: next-hop PE and the route the message takes there.
  typedef struct packed {
    logic [PE_W-1:0] dest;
    route_t          route;
  } noc_route_t;

  // Per-vertex configuration held in the VPU.
  typedef struct packed {
    logic              enable;   // 0: VPU unused (power-gated in silicon)
    logic              relay;    // 1: unmapped VPU used for in-flight reduction
    route_t            outbound; // outbound register
    logic [DEG_W-1:0]  degree;   // out-degree, divisor of the PageRank apply
  } vpu_cfg_t;

  typedef struct packed {
    logic             active;
    logic [VAL_W-1:0] val;
  } vpu_init_t;

  // Targets of the load bus.
  typedef enum logic [2:0] {
    CFG_BITMASK  = 3'd0,
    CFG_INTER    = 3'd1,
    CFG_TOPE     = 3'd2,
    CFG_TONOC    = 3'd3,
    CFG_VPU_CFG  = 3'd4,
    CFG_VPU_INIT = 3'd5
  } cfg_target_e;

endpackage
