// symnet_pkg: types shared by the SYMNET address network and the COSYM
// coherence controllers.
//
// An address request is the word a processor's address port controller
// drives onto the optical address subnetwork when it holds the token. It
// carries the request kind, the block address, the issuing node and one
// argument node (the new owner of a type-1 transfer write-back, or the new
// next sharer of a type-2 transfer write-back). The request kinds, the
// stable MOESI states and the transient states follow the protocol
// description; the field widths and the encoding are this design's choice.
package symnet_pkg;

  // Block address width: 32-bit byte address, 32-byte blocks.
  localparam int unsigned BLK_AW = 27;
  // Node identifiers: processors are 0..NUM_PROC-1, memory modules follow.
  localparam int unsigned NODE_W = 7;
  localparam logic [NODE_W-1:0] NODE_NONE = '1;

  typedef enum logic [2:0] {
    REQ_READ_MISS  = 3'd1,
    REQ_WRITE_MISS = 3'd2,
    REQ_UPGRADE    = 3'd3,   // invalidation by a holder of an S or O copy
    REQ_TWB1       = 3'd4,   // transfer write-back type 1: ownership transfer
    REQ_TWB2       = 3'd5    // transfer write-back type 2: next-sharer transfer
  } req_kind_e;

  typedef struct packed {
    logic                valid;
    req_kind_e           kind;
    logic [BLK_AW-1:0]   addr;
    logic [NODE_W-1:0]   src;
    logic [NODE_W-1:0]   arg;
  } addr_req_t;

  localparam int unsigned REQ_W = $bits(addr_req_t);

  // Stable states of a cache line.
  typedef enum logic [2:0] {
    ST_I = 3'd0,
    ST_S = 3'd1,
    ST_E = 3'd2,
    ST_O = 3'd3,
    ST_M = 3'd4
  } line_state_e;

  // Transient states of the miss status register (Table of transient states).
  typedef enum logic [3:0] {
    TS_IDLE    = 4'd0,
    TS_IE_ADS_I= 4'd1,   // read issued, not yet inserted (inactive)
    TS_IE_ADS  = 4'd2,   // read inserted (active)
    TS_IS_ADS  = 4'd3,   // saw another read before own became visible
    TS_IE_DS   = 4'd4,
    TS_IS_DS   = 4'd5,
    TS_IO_DS   = 4'd6,
    TS_IE_D    = 4'd7,
    TS_IS_D    = 4'd8,
    TS_IO_D    = 4'd9,
    TS_IM_AD   = 4'd10,  // write issued/inserted (inactive)
    TS_IM_D    = 4'd11,
    TS_SOM_A   = 4'd12,  // S/O,M-a: upgrade issued, waiting for visibility
    TS_II_D    = 4'd13
  } mshr_state_e;

  // Data subnetwork message: a whole cache block moving to a node. The block
  // contents are not carried; only the fact of the transfer.
  typedef struct packed {
    logic                valid;
    logic [BLK_AW-1:0]   addr;
    logic [NODE_W-1:0]   dst;
    logic [NODE_W-1:0]   src;
  } data_msg_t;

  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
