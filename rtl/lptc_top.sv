// lptc_top -- low power trace cache fetch unit for an embedded processor.
//
// The fetch unit replaces a conventional instruction cache. Instructions are
// delivered from three structures, looked up in order of their access energy:
// a one-entry fast hit buffer, a 256-line trace cache with start/end
// (partial) tag matching, and a 32-word instruction buffer refilled from the
// L2 cache. The trace cache is filled not by fetch but at completion: the
// filling logic collects completed instructions in the line fill buffer and
// writes finished traces, with unconditional branches folded away, into the
// trace cache. Fetched instructions wait in an 8-entry fetch queue for the
// integer unit.
//
//   L2 --> instruction_buffer --+
//          trace_cache ---------+--> fetch_ctrl (mux) --> fetch_queue --> core
//           |       ^           |
//           v       |           |
//   fast_hit_buffer line_fill_buffer <-- filling_logic <-- core completion
//
// Ports: the L2 request/response port (see fetch_ctrl), the fetch queue read
// side (deq_*), the core's redirect, the core's completion report (`ret`,
// which must echo the fetch packet's `src`), and one-cycle activity strobes
// for power accounting. The integer unit and the L2 cache are outside.
//
// The block structure follows the paper's fetch unit diagram; the
// interfaces between the blocks are this design's own.
module lptc_top
  import lptc_pkg::*;
#(
  parameter int unsigned TC_ENTRIES = lptc_pkg::DEF_TC_ENTRIES,
  parameter int unsigned TRACE_LEN  = lptc_pkg::DEF_TRACE_LEN,
  parameter int unsigned IB_ENTRIES = lptc_pkg::DEF_IB_ENTRIES,
  parameter int unsigned IFQ_DEPTH  = lptc_pkg::DEF_IFQ_DEPTH,
  parameter int unsigned L2_BURST   = lptc_pkg::DEF_L2_BURST,
  parameter addr_t       RESET_PC   = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  // L2 cache
  output logic         l2_req_valid,
  output addr_t        l2_req_addr,
  input  logic         l2_req_ready,
  input  logic         l2_rsp_valid,
  input  word_t        l2_rsp_data,
  // to the integer unit
  output logic         deq_valid,
  input  logic         deq_ready,
  output fetch_pkt_t   deq_pkt,
  // from the integer unit
  input  logic         redirect_valid,
  input  addr_t        redirect_pc,
  input  retire_t      ret,
  // activity
  output lptc_events_t events
);

  localparam int unsigned CNT_W = $clog2(TRACE_LEN + 1);

  addr_t      lookup_addr;
  logic       q_full, q_push;
  fetch_pkt_t q_pkt;

  logic       fhb_en, fhb_hit, fhb_load;
  word_t      fhb_word;
  trace_tag_t fhb_tag;

  logic       tc_en, tc_hit;
  word_t      tc_word;
  trace_tag_t tc_tag;
  logic [TRACE_LEN-1:0][DATA_W-1:0] tc_words;

  logic       ib_en, ib_hit, ib_fill_en;
  word_t      ib_word, ib_fill_word;
  addr_t      ib_fill_addr;

  logic       lfb_clear, lfb_push, lfb_full;
  addr_t      lfb_push_addr, lfb_start, lfb_last;
  word_t      lfb_push_word;
  logic [CNT_W-1:0] lfb_count;
  logic [TRACE_LEN-1:0][DATA_W-1:0] lfb_words;

  logic       tc_write_en;
  trace_tag_t tc_write_tag;

  logic       ev_l2_request, ev_fold, ev_queue_stall;

  fetch_ctrl #(.L2_BURST(L2_BURST), .RESET_PC(RESET_PC)) u_fetch_ctrl (
    .clk, .rst_n,
    .redirect_valid, .redirect_pc,
    .q_full, .q_push, .q_pkt,
    .lookup_addr,
    .fhb_en, .fhb_hit, .fhb_word, .fhb_tag, .fhb_load,
    .tc_en, .tc_hit, .tc_word, .tc_tag,
    .ib_en, .ib_hit, .ib_word, .ib_fill_en, .ib_fill_addr, .ib_fill_word,
    .l2_req_valid, .l2_req_addr, .l2_req_ready, .l2_rsp_valid, .l2_rsp_data,
    .ev_l2_request, .ev_fold, .ev_queue_stall
  );

  fast_hit_buffer #(.TRACE_LEN(TRACE_LEN)) u_fhb (
    .clk, .rst_n,
    .lookup_en   (fhb_en),
    .lookup_addr (lookup_addr),
    .hit         (fhb_hit),
    .hit_word    (fhb_word),
    .hit_tag     (fhb_tag),
    .load_en     (fhb_load),
    .load_tag    (tc_tag),
    .load_words  (tc_words)
  );

  trace_cache #(.ENTRIES(TC_ENTRIES), .TRACE_LEN(TRACE_LEN)) u_tc (
    .clk, .rst_n,
    .lookup_en   (tc_en),
    .lookup_addr (lookup_addr),
    .hit         (tc_hit),
    .hit_word    (tc_word),
    .hit_tag     (tc_tag),
    .hit_words   (tc_words),
    .write_en    (tc_write_en),
    .write_tag   (tc_write_tag),
    .write_words (lfb_words)
  );

  instruction_buffer #(.ENTRIES(IB_ENTRIES)) u_ib (
    .clk, .rst_n,
    .lookup_en   (ib_en),
    .lookup_addr (lookup_addr),
    .hit         (ib_hit),
    .hit_word    (ib_word),
    .fill_en     (ib_fill_en),
    .fill_addr   (ib_fill_addr),
    .fill_word   (ib_fill_word)
  );

  line_fill_buffer #(.TRACE_LEN(TRACE_LEN)) u_lfb (
    .clk, .rst_n,
    .clear     (lfb_clear),
    .push      (lfb_push),
    .push_addr (lfb_push_addr),
    .push_word (lfb_push_word),
    .count     (lfb_count),
    .start     (lfb_start),
    .last      (lfb_last),
    .words     (lfb_words),
    .full      (lfb_full)
  );

  filling_logic #(.TRACE_LEN(TRACE_LEN)) u_fill (
    .clk, .rst_n,
    .ret,
    .lfb_clear, .lfb_push, .lfb_push_addr, .lfb_push_word,
    .lfb_count, .lfb_start, .lfb_last,
    .tc_write_en, .tc_write_tag
  );

  fetch_queue #(.DEPTH(IFQ_DEPTH)) u_ifq (
    .clk, .rst_n,
    .flush     (redirect_valid),
    .push      (q_push),
    .push_pkt  (q_pkt),
    .full      (q_full),
    .pop_valid (deq_valid),
    .pop_ready (deq_ready),
    .pop_pkt   (deq_pkt)
  );

  always_comb begin
    events.fhb_lookup  = fhb_en;
    events.fhb_hit     = fhb_hit;
    events.tc_lookup   = tc_en;
    events.tc_hit      = tc_hit;
    events.ib_lookup   = ib_en;
    events.ib_hit      = ib_hit;
    events.l2_request  = ev_l2_request;
    events.tc_write    = tc_write_en;
    events.fold        = ev_fold;
    events.queue_stall = ev_queue_stall;
  end

  // The filling logic never lets a trace outgrow the line fill buffer.
  a_lfb_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                !(lfb_full && lfb_push && !lfb_clear));

endmodule
