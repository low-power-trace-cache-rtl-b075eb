// lptc_pkg -- shared types and constants of the low power trace cache
// fetch unit.
//
// The fetch unit works on 32-bit byte addresses of word-aligned 32-bit
// instructions. A trace line is described by a tag (trace_tag_t) holding the
// address of its first and last instruction, so that any address between the
// two hits the line ("partial tag matching"), plus the folding information of
// an unconditional branch that ended the trace. The line's words are kept
// beside the tag as a packed array sized by each module's TRACE_LEN.
//
// The sizes below are the defaults of the modules: 256 trace lines of up to
// 20 words, a 32-entry instruction buffer and an 8-entry fetch queue follow
// the paper; the L2 burst length is this design's choice.
package lptc_pkg;

  localparam int unsigned ADDR_W        = 32;
  localparam int unsigned DATA_W        = 32;
  localparam int unsigned DEF_TC_ENTRIES    = 256;
  localparam int unsigned DEF_TRACE_LEN   = 20;
  localparam int unsigned DEF_IB_ENTRIES    = 32;
  localparam int unsigned DEF_IFQ_DEPTH    = 8;
  localparam int unsigned DEF_L2_BURST    = 4;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] word_t;

  // Tag of one trace line.
  typedef struct packed {
    logic  valid;
    addr_t start;    // address of the first instruction of the trace
    addr_t last;     // address of the last stored instruction
    logic  folded;   // trace ended with an unconditional branch, not stored
    addr_t next_pc;  // target of that branch, used when folded
  } trace_tag_t;

  // Where a fetched instruction came from.
  typedef enum logic [1:0] {
    SRC_FHB = 2'd0,
    SRC_TC  = 2'd1,
    SRC_IB  = 2'd2
  } fetch_src_e;

  // Control-flow class of a completed instruction, reported by the core.
  typedef enum logic [1:0] {
    K_PLAIN = 2'd0,  // no control transfer
    K_COND  = 2'd1,  // conditional direct branch
    K_JUMP  = 2'd2,  // unconditional direct branch without side effect: foldable
    K_OTHER = 2'd3   // call, return, indirect jump: stored, ends the trace
  } ctrl_kind_e;

  // One entry of the fetch queue.
  typedef struct packed {
    addr_t      pc;
    word_t      instr;
    addr_t      next_pc;  // address fetched after this one
    logic       folded;   // next_pc is the target of a folded branch
    fetch_src_e src;
  } fetch_pkt_t;

  // One instruction completed by the core.
  typedef struct packed {
    logic       valid;
    addr_t      pc;
    word_t      instr;
    ctrl_kind_e kind;
    logic       taken;
    addr_t      target;
    fetch_src_e src;
  } retire_t;

  // One-cycle activity strobes, the events a power model counts.
  typedef struct packed {
    logic fhb_lookup;
    logic fhb_hit;
    logic tc_lookup;
    logic tc_hit;
    logic ib_lookup;
    logic ib_hit;
    logic l2_request;
    logic tc_write;
    logic fold;
    logic queue_stall;
  } lptc_events_t;

endpackage
