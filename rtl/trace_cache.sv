// trace_cache -- the embedded trace cache: ENTRIES trace lines of up to
// TRACE_LEN instruction words.
//
// Each line stores a trace built by the filling logic: a run of consecutive
// instructions from address `start` to address `last`, optionally ended by a
// folded unconditional branch whose target is kept in the tag. Lookup uses
// partial tag matching: every valid line compares the fetch address against
// its start and last address, and any address in that range hits. The line
// with the lowest index among the matching ones is chosen. On a hit the whole
// line (tag and words) is presented, so the fetch unit can copy it into the
// fast hit buffer, together with the addressed word.
//
// Interface: lookup is combinational and gated by lookup_en. A write stores
// write_tag/write_words at the next clock edge into the line named by a
// round-robin replacement pointer, which then advances. Reset invalidates all
// lines and clears the pointer.
//
// From the paper: 256 lines, 20-word traces, start/end-address tags with
// partial matching. This design's choices: full associativity (the paper
// gives no index function, and a range match cannot be indexed by the low
// address bits), lowest-index priority and round-robin replacement.
module trace_cache
  import lptc_pkg::*;
#(
  parameter int unsigned ENTRIES   = lptc_pkg::DEF_TC_ENTRIES,
  parameter int unsigned TRACE_LEN = lptc_pkg::DEF_TRACE_LEN
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             lookup_en,
  input  addr_t                            lookup_addr,
  output logic                             hit,
  output word_t                            hit_word,
  output trace_tag_t                       hit_tag,
  output logic [TRACE_LEN-1:0][DATA_W-1:0] hit_words,
  input  logic                             write_en,
  input  trace_tag_t                       write_tag,
  input  logic [TRACE_LEN-1:0][DATA_W-1:0] write_words
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  trace_tag_t                       tags_q  [ENTRIES];
  logic [TRACE_LEN-1:0][DATA_W-1:0] words_q [ENTRIES];
  logic [IDX_W-1:0]                 repl_q;
  logic [ENTRIES-1:0]               match;
  logic [IDX_W-1:0]                 hit_idx;
  addr_t                            offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tags_q[i] <= '0;
      repl_q <= '0;
    end else if (write_en) begin
      tags_q[repl_q] <= write_tag;
      repl_q <= (repl_q == IDX_W'(ENTRIES - 1)) ? '0 : repl_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (write_en) words_q[repl_q] <= write_words;
  end

  // Partial tag match of every line.
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      match[i] = tags_q[i].valid &&
                 (lookup_addr >= tags_q[i].start) && (lookup_addr <= tags_q[i].last);
    end
  end

  // Lowest matching index wins.
  always_comb begin
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) hit_idx = IDX_W'(i);
    end
  end

  always_comb begin
    hit       = lookup_en && (|match);
    hit_tag   = tags_q[hit_idx];
    hit_words = words_q[hit_idx];
    offset    = (lookup_addr - hit_tag.start) >> 2;
    hit_word  = '0;
    if (hit && offset < ADDR_W'(TRACE_LEN)) hit_word = hit_words[offset];
  end

endmodule
