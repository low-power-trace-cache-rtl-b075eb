// line_fill_buffer -- staging buffer for the trace under construction.
//
// The filling logic pushes completed instructions into it one by one; when a
// trace is finished its contents (first and last address, count and words)
// are written into the trace cache and the buffer restarts. A clear and a push
// in the same cycle start a new trace whose first word is the pushed one, so
// that the finished trace can be read out in the very cycle the next one
// begins.
//
// Interface: contents are registered; count, start, last, words and full are
// the state before the clock edge. A push into a full buffer is ignored (the
// filling logic never issues one; an assertion checks it). Reset empties the
// buffer.
//
// From the paper: a capacity of 20 instructions. The push/clear protocol is
// this design's own.
module line_fill_buffer
  import lptc_pkg::*;
#(
  parameter int unsigned TRACE_LEN = lptc_pkg::DEF_TRACE_LEN
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             clear,
  input  logic                             push,
  input  addr_t                            push_addr,
  input  word_t                            push_word,
  output logic [$clog2(TRACE_LEN+1)-1:0]   count,
  output addr_t                            start,
  output addr_t                            last,
  output logic [TRACE_LEN-1:0][DATA_W-1:0] words,
  output logic                             full
);

  localparam int unsigned CNT_W = $clog2(TRACE_LEN + 1);

  logic [CNT_W-1:0] base;

  assign full = (count == CNT_W'(TRACE_LEN));
  assign base = clear ? '0 : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      start <= '0;
      last  <= '0;
    end else begin
      if (push && base < CNT_W'(TRACE_LEN)) begin
        count <= base + 1'b1;
        last  <= push_addr;
        if (base == '0) start <= push_addr;
      end else if (clear) begin
        count <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push && base < CNT_W'(TRACE_LEN)) words[base] <= push_word;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && !clear && full));

endmodule
