// tb_trace_cache -- self-checking test of the trace cache.
//
// Uses an 8-line cache with 6-word traces. Writes lines through the
// round-robin replacement pointer, then compares every lookup over a range of
// addresses with a reference model kept in the testbench (arrays of start,
// last and words, lowest index first). Checks partial tag matching inside a
// line, misses outside all lines, that the line's tag and all its words come
// out on a hit, replacement order after the cache wraps, and reset.
module tb_trace_cache;
  import lptc_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned L = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lookup_en;
  addr_t lookup_addr;
  logic hit;
  word_t hit_word;
  trace_tag_t hit_tag;
  logic [L-1:0][DATA_W-1:0] hit_words;
  logic write_en;
  trace_tag_t write_tag;
  logic [L-1:0][DATA_W-1:0] write_words;

  int checks = 0, failures = 0;

  // reference model
  logic  m_valid [N];
  addr_t m_start [N];
  addr_t m_last  [N];
  word_t m_words [N][L];
  int    m_ptr;

  trace_cache #(.ENTRIES(N), .TRACE_LEN(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_line(input addr_t start, input int n);
    write_tag = '{valid: 1'b1, start: start, last: start + addr_t'(4 * (n - 1)),
                  folded: 1'b0, next_pc: start + addr_t'(4 * n)};
    for (int i = 0; i < L; i++) write_words[i] = $urandom;
    m_valid[m_ptr] = 1'b1;
    m_start[m_ptr] = start;
    m_last[m_ptr]  = start + addr_t'(4 * (n - 1));
    for (int i = 0; i < L; i++) m_words[m_ptr][i] = write_words[i];
    m_ptr = (m_ptr + 1) % N;
    write_en = 1'b1;
    @(posedge clk);
    #1 write_en = 1'b0;
  endtask

  task automatic probe(input addr_t a);
    int idx = -1;
    for (int i = N - 1; i >= 0; i--)
      if (m_valid[i] && a >= m_start[i] && a <= m_last[i]) idx = i;
    lookup_addr = a;
    lookup_en   = 1'b1;
    #1;
    check(hit == (idx >= 0), $sformatf("hit at %h", a));
    if (idx >= 0) begin
      check(hit_word == m_words[idx][(a - m_start[idx]) >> 2], $sformatf("word at %h", a));
      check(hit_tag.start == m_start[idx] && hit_tag.last == m_last[idx], "tag of hit line");
      for (int i = 0; i < L; i++) check(hit_words[i] == m_words[idx][i], "line words");
    end
    lookup_en = 1'b0;
    #1;
    check(!hit, "lookup_en gates hit");
  endtask

  task automatic sweep_all;
    for (addr_t a = 32'h0; a < 32'h400; a += 4) probe(a);
  endtask

  initial begin
    lookup_en = 0; lookup_addr = 0; write_en = 0; write_tag = '0; write_words = '0;
    m_ptr = 0;
    for (int i = 0; i < N; i++) m_valid[i] = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    sweep_all();
    // fill half, distinct ranges
    write_line(32'h010, 6);
    write_line(32'h080, 3);
    write_line(32'h100, 1);
    write_line(32'h1F0, 5);
    sweep_all();
    // overlapping line: the lower index must win
    write_line(32'h018, 4);
    probe(32'h018); probe(32'h024);
    // wrap the replacement pointer
    for (int k = 0; k < 7; k++) write_line(addr_t'(32'h200 + 32 * k), 1 + (k % L));
    sweep_all();
    check(!hit, "final");
    rst_n = 1'b0; #1; rst_n = 1'b1;
    for (int i = 0; i < N; i++) m_valid[i] = 1'b0;
    m_ptr = 0;
    probe(32'h200);
    write_line(32'h300, 2);
    probe(32'h300); probe(32'h304); probe(32'h308);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
