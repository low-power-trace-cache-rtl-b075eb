// instruction_buffer -- small fully associative buffer of single
// instruction words, refilled from the L2 cache.
//
// It serves the fetches that miss both the fast hit buffer and the trace
// cache, so that instructions outside the traces kept in the trace cache do
// not all pay the L2 latency. Each entry holds one word and its word address.
// A fill writes the entry that already holds the same address if there is
// one, otherwise the oldest entry (FIFO replacement).
//
// Interface: lookup is combinational and gated by lookup_en (one-cycle hit
// latency, as in the paper's timing table). A fill is written at the next
// clock edge. Reset invalidates all entries.
//
// From the paper: 32 entries (the configuration it recommends for an
// embedded processor) and the one-cycle hit. One word per entry, full
// associativity and FIFO replacement are this design's choices.
module instruction_buffer
  import lptc_pkg::*;
#(
  parameter int unsigned ENTRIES = lptc_pkg::DEF_IB_ENTRIES
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  lookup_en,
  input  addr_t lookup_addr,
  output logic  hit,
  output word_t hit_word,
  input  logic  fill_en,
  input  addr_t fill_addr,
  input  word_t fill_word
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic               valid_q [ENTRIES];
  addr_t              addr_q  [ENTRIES];
  word_t              word_q  [ENTRIES];
  logic [IDX_W-1:0]   fifo_q;
  logic               fill_present;
  logic [IDX_W-1:0]   fill_idx;

  // Lookup.
  always_comb begin
    hit      = 1'b0;
    hit_word = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (lookup_en && valid_q[i] && addr_q[i][ADDR_W-1:2] == lookup_addr[ADDR_W-1:2]) begin
        hit      = 1'b1;
        hit_word = word_q[i];
      end
    end
  end

  // Fill target: the entry already holding this address, else the oldest.
  always_comb begin
    fill_present = 1'b0;
    fill_idx     = fifo_q;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && addr_q[i][ADDR_W-1:2] == fill_addr[ADDR_W-1:2]) begin
        fill_present = 1'b1;
        fill_idx     = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid_q[i] <= 1'b0;
      fifo_q <= '0;
    end else if (fill_en) begin
      valid_q[fill_idx] <= 1'b1;
      if (!fill_present) fifo_q <= (fifo_q == IDX_W'(ENTRIES - 1)) ? '0 : fifo_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_en) begin
      addr_q[fill_idx] <= fill_addr;
      word_q[fill_idx] <= fill_word;
    end
  end

endmodule
