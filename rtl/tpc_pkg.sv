// tpc_pkg: types and constants shared by the blocks of the composite prefetcher
// (T2 stride component, P1 pointer component, C1 region component, coordinator).
// Cache geometry follows the evaluated processor: 64-byte lines, regions of 16
// lines, 64 logical registers tracked by the taint unit. Address width (64 bits)
// and the 4-byte instruction size are this design's choices.
package tpc_pkg;
  localparam int unsigned ADDR_W       = 64;
  localparam int unsigned LINE_OFF     = 6;   // 64-byte cache lines
  localparam int unsigned INSN_OFF     = 2;   // 4-byte instruction slots
  localparam int unsigned REGION_LINES = 16;  // C1 region = 16 lines
  localparam int unsigned REGION_OFF   = LINE_OFF + 4;
  localparam int unsigned NUM_LREGS    = 64;
  localparam int unsigned LREG_W       = 6;
  localparam int unsigned TAG_W        = 5;   // request tag (T2 SIT index, P1 kind)
  localparam int unsigned DIST_W       = 6;   // prefetch distance / lead, in iterations

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LREG_W-1:0] lreg_t;

  // Per-instruction T2 state kept beside the I-cache.
  typedef enum logic [1:0] {
    IS_UNKNOWN    = 2'd0,
    IS_OBSERVE    = 2'd1,
    IS_STRIDED    = 2'd2,
    IS_NONSTRIDED = 2'd3
  } istate_e;

  // Which component (and which kind of prefetch) produced a request.
  typedef enum logic [1:0] {
    SRC_T2    = 2'd0,  // plain stride prefetch
    SRC_T2PTR = 2'd1,  // stride prefetch of a strided-pointer load: its data goes to P1
    SRC_P1    = 2'd2,
    SRC_C1    = 2'd3
  } pf_src_e;

  typedef enum logic {
    DEST_L1 = 1'b0,
    DEST_L2 = 1'b1
  } pf_dest_e;

  typedef struct packed {
    addr_t             addr;
    pf_src_e           src;
    logic [TAG_W-1:0]  tag;
  } pf_req_t;

  typedef struct packed {
    addr_t             addr;
    pf_src_e           src;
    logic [TAG_W-1:0]  tag;
    pf_dest_e          dest;
  } pf_out_t;

  // P1 tags
  localparam logic [TAG_W-1:0] P1_TAG_TARGET = 5'd0;  // prefetch of a pointer target, no follow-up
  localparam logic [TAG_W-1:0] P1_TAG_CHAIN  = 5'd1;  // pointer-chain step, its data drives the next

endpackage
