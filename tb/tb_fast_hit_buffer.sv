// tb_fast_hit_buffer -- self-checking test of the one-entry fast hit buffer.
//
// Loads trace lines of various lengths and checks, address by address around
// each line, that the buffer hits exactly on the range start..last and
// returns the word (addr - start)/4, that lookup_en gates the hit, that a new
// load replaces the old line and that reset empties the buffer.
module tb_fast_hit_buffer;
  import lptc_pkg::*;

  localparam int unsigned L = DEF_TRACE_LEN;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lookup_en;
  addr_t lookup_addr;
  logic hit;
  word_t hit_word;
  trace_tag_t hit_tag;
  logic load_en;
  trace_tag_t load_tag;
  logic [L-1:0][DATA_W-1:0] load_words;

  int checks = 0, failures = 0;

  fast_hit_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  task automatic load(input addr_t start, input int n, input word_t seed);
    load_tag = '{valid: 1'b1, start: start, last: start + addr_t'(4 * (n - 1)),
                 folded: 1'b1, next_pc: 32'h9000};
    for (int i = 0; i < L; i++) load_words[i] = seed + word_t'(i * 7);
    load_en = 1'b1;
    @(posedge clk);
    #1 load_en = 1'b0;
  endtask

  task automatic sweep(input addr_t start, input int n, input word_t seed);
    for (int k = -3; k < n + 3; k++) begin
      logic exp_hit;
      lookup_addr = start + addr_t'(4 * k);
      lookup_en   = 1'b1;
      exp_hit     = (k >= 0) && (k < n);
      #1;
      check(hit == exp_hit, $sformatf("hit at %h (k=%0d)", lookup_addr, k));
      if (exp_hit) check(hit_word == seed + word_t'(k * 7), $sformatf("word at %h", lookup_addr));
      lookup_en = 1'b0;
      #1;
      check(!hit, "lookup_en gates hit");
    end
  endtask

  initial begin
    lookup_en = 0; lookup_addr = 0; load_en = 0; load_tag = '0; load_words = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    lookup_en = 1; lookup_addr = 32'h0; #1;
    check(!hit, "empty buffer misses");
    load(32'h100, 10, 32'hA000);
    sweep(32'h100, 10, 32'hA000);
    check(hit_tag.next_pc == 32'h9000 && hit_tag.folded, "tag is passed out");
    load(32'h2000, L, 32'hB000);
    sweep(32'h2000, L, 32'hB000);
    lookup_en = 1; lookup_addr = 32'h104; #1;
    check(!hit, "old line replaced");
    load(32'h40, 1, 32'hC000);
    sweep(32'h40, 1, 32'hC000);
    rst_n = 1'b0; #1; rst_n = 1'b1;
    lookup_en = 1; lookup_addr = 32'h40; #1;
    check(!hit, "reset empties buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
