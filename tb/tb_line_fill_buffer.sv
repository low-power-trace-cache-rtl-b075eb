// tb_line_fill_buffer -- self-checking test of the line fill buffer.
//
// Uses a 5-word buffer and a reference model: random sequences of push,
// clear and clear-with-push, checking count, start, last, the stored words
// and the full flag after every cycle.
module tb_line_fill_buffer;
  import lptc_pkg::*;

  localparam int unsigned L = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, push;
  addr_t push_addr;
  word_t push_word;
  logic [$clog2(L+1)-1:0] count;
  addr_t start, last;
  logic [L-1:0][DATA_W-1:0] words;
  logic full;

  int checks = 0, failures = 0, fulls = 0, restarts = 0;

  int    m_cnt;
  addr_t m_start, m_last;
  word_t m_words [L];

  line_fill_buffer #(.TRACE_LEN(L)) dut (.*);

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

  initial begin
    clear = 0; push = 0; push_addr = 0; push_word = 0;
    m_cnt = 0; m_start = 0; m_last = 0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !full, "empty after reset");
    for (int r = 0; r < 2000; r++) begin
      int op;
      op = $urandom % 8;
      clear = (op == 0) || (op == 1);
      push  = (op != 0) && !(m_cnt == L && op != 1);
      push_addr = $urandom;
      push_word = $urandom;
      @(posedge clk);
      // model
      if (clear) m_cnt = 0;
      if (clear && push) restarts++;
      if (push) begin
        if (m_cnt == 0) m_start = push_addr;
        m_last = push_addr;
        m_words[m_cnt] = push_word;
        m_cnt++;
      end
      #1;
      check(count == m_cnt, "count");
      check(full == (m_cnt == L), "full");
      if (full) fulls++;
      if (m_cnt > 0) begin
        check(start == m_start && last == m_last, "start/last");
        for (int i = 0; i < m_cnt; i++) check(words[i] == m_words[i], "words");
      end
      @(negedge clk);
    end
    check(fulls > 0 && restarts > 0, "full and restart both seen");
    clear = 0; push = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
