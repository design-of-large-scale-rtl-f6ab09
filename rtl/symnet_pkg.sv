// symnet_pkg: types and constants shared by the SYMNET address sub-network,
// the COSYM cache controllers and the memory controller.
//
// An address request travels the optical tree as one wide word: the request
// fields plus one extra lane for the snoop response (the document counts the
// snoop bit among the b address bits of the parallel link). An idle link is
// all zeros, so the Y-couplers can merge links with a bitwise OR, the way
// optical pulses add up in a combiner.
//
// Sizes that follow the document: 32-byte cache blocks, up to 128 processors
// (the power-budget limit it quotes). The 32-bit byte address, the 7-bit
// processor id and the request encoding are this design's own choices.
package symnet_pkg;

  localparam int unsigned ADDR_W      = 32;                 // byte address
  localparam int unsigned BLOCK_BYTES = 32;                 // cache block
  localparam int unsigned BLOCK_BITS  = BLOCK_BYTES * 8;    // 256
  localparam int unsigned OFF_W       = $clog2(BLOCK_BYTES);
  localparam int unsigned BLK_W       = ADDR_W - OFF_W;     // block address
  localparam int unsigned WORDS       = BLOCK_BYTES / 4;    // 32-bit words
  localparam int unsigned MAX_PROC    = 128;
  localparam int unsigned PID_W       = $clog2(MAX_PROC);

  typedef logic [BLK_W-1:0]      blk_t;
  typedef logic [PID_W-1:0]      pid_t;
  typedef logic [BLOCK_BITS-1:0] line_t;

  // Transactions inserted into the address sub-network.
  typedef enum logic [2:0] {
    REQ_NONE    = 3'd0,
    REQ_RD_MISS = 3'd1,   // read miss
    REQ_WR_MISS = 3'd2,   // write miss
    REQ_UPGRADE = 3'd3,   // write to an S/O copy: invalidate the others
    REQ_TWB1    = 3'd4,   // transfer write-back type 1: ownership to next sharer
    REQ_TWB2    = 3'd5    // transfer write-back type 2: next sharer to previous sharer
  } req_kind_e;

  typedef struct packed {
    logic      valid;
    req_kind_e kind;
    pid_t      src;       // inserting processor
    blk_t      blk;       // block address
    logic      nxt_vld;   // transfer write-backs: next sharer carried
    pid_t      nxt;
  } addr_req_t;

  // One link of the address tree: a request and the snoop/acknowledge lane.
  typedef struct packed {
    addr_req_t req;
    logic      snoop;
  } link_t;

  // Stable cache states (MOESI).
  typedef enum logic [2:0] {
    ST_I = 3'd0,
    ST_S = 3'd1,
    ST_E = 3'd2,
    ST_O = 3'd3,
    ST_M = 3'd4
  } cstate_e;

  // A block on the data sub-network (a conflict-free crossbar outside this RTL).
  typedef struct packed {
    logic  valid;
    logic  to_mem;        // destination is the memory module
    pid_t  dst;           // destination processor when !to_mem
    blk_t  blk;
    line_t data;
  } dn_msg_t;

  // Protocol event pulses reported by each cache controller.
  localparam int unsigned NEV         = 12;
  localparam int unsigned EV_IS_RACE  = 0;  // IE-ads -> IS-ads
  localparam int unsigned EV_IO       = 1;  // IE-ds  -> IO-ds
  localparam int unsigned EV_II       = 2;  // transient -> II-d
  localparam int unsigned EV_SNOOP_HI = 3;  // this cache answered with snoop high
  localparam int unsigned EV_TWB1     = 4;  // transfer write-back type 1 inserted
  localparam int unsigned EV_TWB2     = 5;  // transfer write-back type 2 inserted
  localparam int unsigned EV_OWB      = 6;  // ordinary write-back started
  localparam int unsigned EV_RETRY    = 7;  // transfer write-back re-issued
  localparam int unsigned EV_FWD      = 8;  // deferred forward queued
  localparam int unsigned EV_UPGRADE  = 9;  // upgrade completed
  localparam int unsigned EV_ACK      = 10; // this cache acknowledged a transfer
  localparam int unsigned EV_WBHIT    = 11; // write-back buffer answered a request

endpackage
