// filling_logic -- builds traces from the instructions the core completes
// and writes them into the trace cache.
//
// It watches the completion stream of the integer unit (one instruction per
// cycle at most) and collects, in the line fill buffer, runs of consecutive
// instructions that were fetched from the instruction buffer, i.e. that missed
// the trace cache. A trace is finished, and written into the trace cache in
// the following cycle, when
//   * a taken conditional branch or a call/return/indirect jump completes
//     (it is the trace's last instruction),
//   * an unconditional direct branch completes right after the trace: the
//     branch is folded, i.e. not stored, and its target is kept as the trace's
//     next address, so that fetch jumps there without spending a cycle on the
//     branch,
//   * the trace reaches TRACE_LEN instructions,
//   * the next instruction is not the successor of the last one, or was itself
//     fetched from a trace (the open trace is then written as it is).
// Not-taken conditional branches stay inside a trace.
//
// Interface: `ret` is the completed instruction of this cycle. The line fill
// buffer is driven through lfb_clear/lfb_push and read through its outputs.
// tc_write_en and tc_write_tag are combinational from the buffer's state and
// are taken by the trace cache at the clock edge, together with the buffer's
// words, which go to the trace cache directly; in that same cycle the buffer may already
// start the next trace. Reset forgets any trace in progress.
//
// From the paper: traces of up to 20 words filled at completion, branch
// folding of unconditional branches and start/end tags. The exact end-of-trace
// rules and the choice to build traces only from trace-cache misses are this
// design's own.
module filling_logic
  import lptc_pkg::*;
#(
  parameter int unsigned TRACE_LEN = lptc_pkg::DEF_TRACE_LEN
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  retire_t                          ret,
  output logic                             lfb_clear,
  output logic                             lfb_push,
  output addr_t                            lfb_push_addr,
  output word_t                            lfb_push_word,
  input  logic [$clog2(TRACE_LEN+1)-1:0]   lfb_count,
  input  addr_t                            lfb_start,
  input  addr_t                            lfb_last,
  output logic                             tc_write_en,
  output trace_tag_t                       tc_write_tag
);

  localparam int unsigned CNT_W = $clog2(TRACE_LEN + 1);

  logic             closed_q;   // buffer holds a finished trace, written this cycle
  logic             fold_q;
  addr_t            next_q;

  logic [CNT_W-1:0] open_cnt;
  logic [CNT_W-1:0] new_cnt;
  logic             contiguous;
  logic             ends_trace;
  logic             close_now;
  logic             fold_now;
  logic             commit_open;

  always_comb begin
    open_cnt    = closed_q ? '0 : lfb_count;
    contiguous  = (open_cnt != '0) && (ret.pc == lfb_last + 32'd4);
    ends_trace  = (ret.kind == K_COND && ret.taken) || (ret.kind == K_OTHER);
    lfb_clear   = closed_q;
    lfb_push    = 1'b0;
    commit_open = 1'b0;
    close_now   = 1'b0;
    fold_now    = 1'b0;
    new_cnt     = '0;

    if (ret.valid) begin
      if (ret.src != SRC_IB) begin
        // Fetched from a stored trace: end any trace in progress.
        commit_open = (open_cnt != '0);
      end else if (ret.kind == K_JUMP) begin
        if (contiguous) begin
          close_now = 1'b1;
          fold_now  = 1'b1;
        end else begin
          commit_open = (open_cnt != '0);
        end
      end else if (contiguous) begin
        lfb_push  = 1'b1;
        new_cnt   = open_cnt + 1'b1;
        close_now = ends_trace || (new_cnt == CNT_W'(TRACE_LEN));
      end else begin
        commit_open = (open_cnt != '0);
        lfb_push    = 1'b1;
        new_cnt     = CNT_W'(1);
        close_now   = ends_trace || (TRACE_LEN == 1);
      end
    end
    if (commit_open) lfb_clear = 1'b1;
    // A brand-new trace needs the buffer restarted even when nothing is open.
    if (lfb_push && new_cnt == CNT_W'(1)) lfb_clear = 1'b1;

    lfb_push_addr = ret.pc;
    lfb_push_word = ret.instr;

    tc_write_en          = closed_q || commit_open;
    tc_write_tag.valid   = 1'b1;
    tc_write_tag.start   = lfb_start;
    tc_write_tag.last    = lfb_last;
    tc_write_tag.folded  = closed_q && fold_q;
    tc_write_tag.next_pc = (closed_q && fold_q) ? next_q : lfb_last + 32'd4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      closed_q <= 1'b0;
      fold_q   <= 1'b0;
      next_q   <= '0;
    end else begin
      closed_q <= close_now;
      fold_q   <= fold_now;
      next_q   <= ret.target;
    end
  end

endmodule
