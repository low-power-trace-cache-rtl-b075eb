// fetch_ctrl -- fetch sequencer and source multiplexer of the low power
// trace cache fetch unit.
//
// It owns the fetch PC and fetches one instruction per cycle into the fetch
// queue. The lookup order is the heart of the power saving:
//   1. the fast hit buffer is looked up alone;
//   2. only if it misses are the trace cache and the instruction buffer
//      enabled; a trace cache hit also copies the hit line into the fast hit
//      buffer;
//   3. only if both miss is the L2 cache asked for L2_BURST words starting at
//      the missing address; they are written into the instruction buffer and
//      fetch resumes at the same PC, which now hits there.
// All three lookups happen in the cycle the PC is presented, so a hit in any
// of them delivers the instruction at the next clock edge (the one-cycle hit
// latency of the paper's timing table). When the word comes from a trace
// line and is the line's last one, the next PC is the line's folded branch
// target if it has one, otherwise PC+4; this is how branch folding saves the
// cycle of the branch. The core corrects the PC with `redirect`, which takes
// priority over fetching in that cycle and may arrive during an L2 refill
// (the refill still completes). Fetch stops while the queue is full.
//
// L2 port: l2_req_valid holds with a stable address until l2_req_ready; the
// L2 then returns L2_BURST words in address order on l2_rsp_valid cycles.
//
// From the paper: the lookup order and its gating, folding and the
// instruction buffer refill from L2. The state machine, the burst refill and
// the redirect protocol are this design's own.
module fetch_ctrl
  import lptc_pkg::*;
#(
  parameter int unsigned L2_BURST = lptc_pkg::DEF_L2_BURST,
  parameter addr_t       RESET_PC = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  // redirect from the core
  input  logic         redirect_valid,
  input  addr_t        redirect_pc,
  // fetch queue
  input  logic         q_full,
  output logic         q_push,
  output fetch_pkt_t   q_pkt,
  // lookup address shared by the three structures
  output addr_t        lookup_addr,
  // fast hit buffer
  output logic         fhb_en,
  input  logic         fhb_hit,
  input  word_t        fhb_word,
  input  trace_tag_t   fhb_tag,
  output logic         fhb_load,
  // trace cache
  output logic         tc_en,
  input  logic         tc_hit,
  input  word_t        tc_word,
  input  trace_tag_t   tc_tag,
  // instruction buffer
  output logic         ib_en,
  input  logic         ib_hit,
  input  word_t        ib_word,
  output logic         ib_fill_en,
  output addr_t        ib_fill_addr,
  output word_t        ib_fill_word,
  // L2 cache
  output logic         l2_req_valid,
  output addr_t        l2_req_addr,
  input  logic         l2_req_ready,
  input  logic         l2_rsp_valid,
  input  word_t        l2_rsp_data,
  // activity
  output logic         ev_l2_request,
  output logic         ev_fold,
  output logic         ev_queue_stall
);

  typedef enum logic [1:0] {S_FETCH, S_L2_REQ, S_L2_WAIT} state_e;

  localparam int unsigned BEAT_W = (L2_BURST > 1) ? $clog2(L2_BURST) : 1;

  state_e            state_q, state_d;
  addr_t             pc_q, pc_d;
  addr_t             miss_q;
  logic [BEAT_W-1:0] beat_q;
  logic              fetch_go;
  logic              from_trace;
  trace_tag_t        line_tag;
  addr_t             seq_next;
  logic              fold_here;

  assign lookup_addr = pc_q;
  assign fetch_go    = (state_q == S_FETCH) && !redirect_valid && !q_full;

  always_comb begin
    fhb_en   = fetch_go;
    tc_en    = fetch_go && !fhb_hit;
    ib_en    = fetch_go && !fhb_hit;
    fhb_load = tc_en && tc_hit;

    from_trace = fhb_hit || (tc_en && tc_hit);
    line_tag   = fhb_hit ? fhb_tag : tc_tag;
    seq_next   = pc_q + 32'd4;
    fold_here  = from_trace && line_tag.folded && (pc_q == line_tag.last);

    q_push            = fetch_go && (fhb_hit || tc_hit || ib_hit);
    q_pkt.pc          = pc_q;
    q_pkt.folded      = fold_here;
    q_pkt.next_pc     = fold_here ? line_tag.next_pc : seq_next;
    if (fhb_hit) begin
      q_pkt.instr = fhb_word;
      q_pkt.src   = SRC_FHB;
    end else if (tc_hit) begin
      q_pkt.instr = tc_word;
      q_pkt.src   = SRC_TC;
    end else begin
      q_pkt.instr = ib_word;
      q_pkt.src   = SRC_IB;
    end

    state_d = state_q;
    pc_d    = pc_q;
    case (state_q)
      S_FETCH: begin
        if (q_push) pc_d = q_pkt.next_pc;
        else if (fetch_go) state_d = S_L2_REQ;
      end
      S_L2_REQ:  if (l2_req_ready) state_d = S_L2_WAIT;
      S_L2_WAIT: if (l2_rsp_valid && beat_q == BEAT_W'(L2_BURST - 1)) state_d = S_FETCH;
      default:   state_d = S_FETCH;
    endcase
    if (redirect_valid) pc_d = redirect_pc;

    l2_req_valid = (state_q == S_L2_REQ);
    l2_req_addr  = miss_q;
    ib_fill_en   = (state_q == S_L2_WAIT) && l2_rsp_valid;
    ib_fill_addr = miss_q + {{(ADDR_W-BEAT_W-2){1'b0}}, beat_q, 2'b00};
    ib_fill_word = l2_rsp_data;

    ev_l2_request  = l2_req_valid && l2_req_ready;
    ev_fold        = q_push && fold_here;
    ev_queue_stall = (state_q == S_FETCH) && !redirect_valid && q_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_FETCH;
      pc_q    <= RESET_PC;
      miss_q  <= '0;
      beat_q  <= '0;
    end else begin
      state_q <= state_d;
      pc_q    <= pc_d;
      if (fetch_go && !q_push) miss_q <= pc_q;
      if (state_q == S_L2_REQ) beat_q <= '0;
      else if (ib_fill_en) beat_q <= beat_q + 1'b1;
    end
  end

  a_l2_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    l2_req_valid && !l2_req_ready |=> l2_req_valid && $stable(l2_req_addr));

endmodule
