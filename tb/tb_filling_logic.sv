// tb_filling_logic -- self-checking test of the trace filling logic.
//
// The filling logic is driven together with a line fill buffer (20 words) by
// a directed completion stream with random idle cycles in between. Every
// trace written to the trace cache is captured and compared with the list of
// traces the stream must produce: a trace ended by a taken conditional
// branch, one ended by a folded unconditional branch (not stored, target kept
// as next address), one cut at the 20-word limit and its remainder ended by a
// call, one cut by an instruction fetched from a stored trace, one cut by a
// discontinuity with a not-taken branch inside, and a lone jump that gives no
// trace.
module tb_filling_logic;
  import lptc_pkg::*;

  localparam int unsigned L = DEF_TRACE_LEN;
  localparam int unsigned CW = $clog2(L + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  retire_t ret;
  logic lfb_clear, lfb_push, lfb_full;
  addr_t lfb_push_addr, lfb_start, lfb_last;
  word_t lfb_push_word;
  logic [CW-1:0] lfb_count;
  logic [L-1:0][DATA_W-1:0] lfb_words;
  logic tc_write_en;
  trace_tag_t tc_write_tag;

  int checks = 0, failures = 0;

  typedef struct {
    addr_t start;
    addr_t last;
    logic  folded;
    addr_t next_pc;
  } exp_t;
  exp_t expq [$];
  trace_tag_t gotq [$];
  logic [L-1:0][DATA_W-1:0] gotw [$];

  filling_logic dut (.*);

  line_fill_buffer u_lfb (
    .clk, .rst_n, .clear(lfb_clear), .push(lfb_push), .push_addr(lfb_push_addr),
    .push_word(lfb_push_word), .count(lfb_count), .start(lfb_start), .last(lfb_last),
    .words(lfb_words), .full(lfb_full)
  );

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

  function automatic word_t iword(input addr_t pc);
    return pc ^ 32'hDEAD_0000;
  endfunction

  always @(posedge clk) begin
    if (rst_n && tc_write_en) begin
      gotq.push_back(tc_write_tag);
      gotw.push_back(lfb_words);  // the trace cache takes the words from the buffer
    end
  end

  task automatic complete(input addr_t pc, input ctrl_kind_e kind, input logic taken,
                          input addr_t target, input fetch_src_e src);
    @(negedge clk);
    ret = '{valid: 1'b1, pc: pc, instr: iword(pc), kind: kind, taken: taken,
            target: target, src: src};
    @(negedge clk);
    ret.valid = 1'b0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  task automatic expect_trace(input addr_t s, input addr_t l, input logic f, input addr_t n);
    expq.push_back('{start: s, last: l, folded: f, next_pc: n});
  endtask

  initial begin
    ret = '0;
    #12 rst_n = 1'b1;
    // 1: taken conditional branch ends the trace
    for (addr_t a = 32'h100; a < 32'h110; a += 4) complete(a, K_PLAIN, 0, 0, SRC_IB);
    complete(32'h110, K_COND, 1, 32'h200, SRC_IB);
    expect_trace(32'h100, 32'h110, 0, 32'h114);
    // 2: unconditional branch folded
    for (addr_t a = 32'h200; a < 32'h20C; a += 4) complete(a, K_PLAIN, 0, 0, SRC_IB);
    complete(32'h20C, K_JUMP, 1, 32'h400, SRC_IB);
    expect_trace(32'h200, 32'h208, 1, 32'h400);
    // 3: 25 straight-line instructions and a call
    for (int i = 0; i < 25; i++) complete(addr_t'(32'h400 + 4 * i), K_PLAIN, 0, 0, SRC_IB);
    complete(32'h464, K_OTHER, 1, 32'h1000, SRC_IB);
    expect_trace(32'h400, addr_t'(32'h400 + 4 * (L - 1)), 0, addr_t'(32'h400 + 4 * L));
    expect_trace(addr_t'(32'h400 + 4 * L), 32'h464, 0, 32'h468);
    // 4: an instruction from a stored trace cuts the open trace
    complete(32'h600, K_PLAIN, 0, 0, SRC_IB);
    complete(32'h604, K_PLAIN, 0, 0, SRC_IB);
    complete(32'h608, K_PLAIN, 0, 0, SRC_TC);
    complete(32'h60C, K_PLAIN, 0, 0, SRC_FHB);
    expect_trace(32'h600, 32'h604, 0, 32'h608);
    // 5: not-taken branch stays inside, discontinuity cuts
    complete(32'h700, K_PLAIN, 0, 0, SRC_IB);
    complete(32'h704, K_COND, 0, 32'h900, SRC_IB);
    complete(32'h708, K_PLAIN, 0, 0, SRC_IB);
    complete(32'h800, K_PLAIN, 0, 0, SRC_IB);
    complete(32'h804, K_COND, 1, 32'h700, SRC_IB);
    expect_trace(32'h700, 32'h708, 0, 32'h70C);
    expect_trace(32'h800, 32'h804, 0, 32'h808);
    // 6: a lone jump makes no trace; a jump after a TC instruction neither
    complete(32'h900, K_JUMP, 1, 32'hA00, SRC_IB);
    complete(32'hA00, K_PLAIN, 0, 0, SRC_TC);
    complete(32'hA04, K_JUMP, 1, 32'hB00, SRC_IB);
    // 7: a trace of one instruction ended by a return
    complete(32'hB00, K_OTHER, 1, 32'h468, SRC_IB);
    expect_trace(32'hB00, 32'hB00, 0, 32'hB04);
    repeat (4) @(negedge clk);

    check(gotq.size() == expq.size(),
          $sformatf("%0d traces written, %0d expected", gotq.size(), expq.size()));
    for (int i = 0; i < expq.size() && i < gotq.size(); i++) begin
      int n;
      check(gotq[i].valid, "written tag valid");
      check(gotq[i].start == expq[i].start && gotq[i].last == expq[i].last,
            $sformatf("trace %0d range %h..%h", i, gotq[i].start, gotq[i].last));
      check(gotq[i].folded == expq[i].folded, $sformatf("trace %0d folded", i));
      if (expq[i].folded) check(gotq[i].next_pc == expq[i].next_pc, $sformatf("trace %0d target", i));
      n = int'((expq[i].last - expq[i].start) >> 2) + 1;
      for (int k = 0; k < n; k++)
        check(gotw[i][k] == iword(expq[i].start + addr_t'(4 * k)), $sformatf("trace %0d word %0d", i, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
