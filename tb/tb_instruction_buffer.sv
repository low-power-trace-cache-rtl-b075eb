// tb_instruction_buffer -- self-checking test of the instruction buffer.
//
// Uses a 4-entry buffer against a reference FIFO model in the testbench:
// random fills (with repeated addresses, which must overwrite in place and
// not advance replacement) followed by lookups of a small address range, so
// hits, misses, FIFO eviction and the lookup_en gating are all exercised.
module tb_instruction_buffer;
  import lptc_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lookup_en;
  addr_t lookup_addr;
  logic hit;
  word_t hit_word;
  logic fill_en;
  addr_t fill_addr;
  word_t fill_word;

  int checks = 0, failures = 0;
  int evictions = 0, overwrites = 0;

  logic  m_valid [N];
  addr_t m_addr  [N];
  word_t m_word  [N];
  int    m_ptr;

  instruction_buffer #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic fill(input addr_t a, input word_t w);
    int idx = -1;
    for (int i = 0; i < N; i++) if (m_valid[i] && m_addr[i] == a) idx = i;
    if (idx < 0) begin
      if (m_valid[m_ptr]) evictions++;
      idx   = m_ptr;
      m_ptr = (m_ptr + 1) % N;
    end else begin
      overwrites++;
    end
    m_valid[idx] = 1'b1; m_addr[idx] = a; m_word[idx] = w;
    fill_en = 1'b1; fill_addr = a; fill_word = w;
    @(posedge clk);
    #1 fill_en = 1'b0;
  endtask

  task automatic probe(input addr_t a);
    int idx = -1;
    for (int i = 0; i < N; i++) if (m_valid[i] && m_addr[i] == a) idx = i;
    lookup_en = 1'b1; lookup_addr = a;
    #1;
    check(hit == (idx >= 0), $sformatf("hit at %h", a));
    if (idx >= 0) check(hit_word == m_word[idx], $sformatf("word at %h", a));
    lookup_en = 1'b0;
    #1;
    check(!hit, "lookup_en gates hit");
  endtask

  initial begin
    lookup_en = 0; lookup_addr = 0; fill_en = 0; fill_addr = 0; fill_word = 0;
    m_ptr = 0;
    for (int i = 0; i < N; i++) m_valid[i] = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 300; r++) begin
      fill(addr_t'(($urandom % 10) * 4), $urandom);
      for (int a = 0; a < 10; a++) probe(addr_t'(a * 4));
    end
    check(evictions > 0 && overwrites > 0, "eviction and in-place overwrite both happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
