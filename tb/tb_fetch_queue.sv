// tb_fetch_queue -- self-checking test of the instruction fetch queue.
//
// Runs the default 8-entry queue with random pushes, pops and occasional
// flushes against a queue model in the testbench; checks order, contents,
// the full flag (including that it rises after exactly DEPTH pushes), and
// that a flush empties it.
module tb_fetch_queue;
  import lptc_pkg::*;

  localparam int unsigned D = DEF_IFQ_DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, push, full, pop_valid, pop_ready;
  fetch_pkt_t push_pkt, pop_pkt;

  int checks = 0, failures = 0, n_full = 0, n_flush = 0;
  fetch_pkt_t model [$];

  fetch_queue dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    flush = 0; push = 0; pop_ready = 0; push_pkt = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    // fill to exactly DEPTH
    for (int i = 0; i < D; i++) begin
      check(!full, "not full before DEPTH pushes");
      push = 1; push_pkt = '0; push_pkt.pc = addr_t'(i * 4);
      model.push_back(push_pkt);
      @(posedge clk); #1;
    end
    push = 0;
    check(full, "full after DEPTH pushes");
    for (int r = 0; r < 5000; r++) begin
      @(negedge clk);
      flush     = ($urandom % 50) == 0;
      push      = ($urandom % 3) != 0 && !full;
      pop_ready = ($urandom % 2) == 0;
      push_pkt.pc      = $urandom;
      push_pkt.instr   = $urandom;
      push_pkt.next_pc = $urandom;
      push_pkt.folded  = $urandom;
      push_pkt.src     = fetch_src_e'($urandom % 3);
      #1;
      check(pop_valid == (model.size() != 0), "pop_valid");
      check(full == (model.size() == D), "full");
      if (full) n_full++;
      if (pop_valid && model.size() != 0) check(pop_pkt == model[0], "head packet");
      @(posedge clk);
      if (flush) begin
        model.delete();
        n_flush++;
      end else begin
        if (pop_ready && model.size() != 0) void'(model.pop_front());
        if (push) model.push_back(push_pkt);
      end
    end
    check(n_full > 0 && n_flush > 0, "full and flush both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
