// fast_hit_buffer -- one-entry buffer in front of the trace cache.
//
// It holds a copy of the trace line that was last read out of the trace
// cache. Every fetch looks here first; only on a miss are the trace cache and
// the instruction buffer enabled, which keeps the long word line of the trace
// cache quiet while the program stays inside one trace. The lookup uses the
// same partial tag matching as the trace cache: any address from the line's
// start to its last instruction hits, and the word is selected by
// (addr - start) / 4.
//
// Interface: the lookup is combinational (hit, hit_word and hit_tag are valid
// in the cycle of lookup_en). A load replaces the held line at the next clock
// edge. Reset clears the valid bit only.
//
// The paper gives the one-entry size and the lookup order; the range
// comparison circuit and word selection are this design's own.
module fast_hit_buffer
  import lptc_pkg::*;
#(
  parameter int unsigned TRACE_LEN = lptc_pkg::DEF_TRACE_LEN
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          lookup_en,
  input  addr_t                         lookup_addr,
  output logic                          hit,
  output word_t                         hit_word,
  output trace_tag_t                    hit_tag,
  input  logic                          load_en,
  input  trace_tag_t                    load_tag,
  input  logic [TRACE_LEN-1:0][DATA_W-1:0] load_words
);

  trace_tag_t                       tag_q;
  logic [TRACE_LEN-1:0][DATA_W-1:0] words_q;
  addr_t                            offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_q <= '0;
    end else if (load_en) begin
      tag_q <= load_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (load_en) words_q <= load_words;
  end

  always_comb begin
    offset   = (lookup_addr - tag_q.start) >> 2;
    hit      = lookup_en && tag_q.valid &&
               (lookup_addr >= tag_q.start) && (lookup_addr <= tag_q.last);
    hit_word = '0;
    if (hit && offset < ADDR_W'(TRACE_LEN)) hit_word = words_q[offset];
    hit_tag  = tag_q;
  end

endmodule
