// tb_fetch_ctrl -- self-checking test of the fetch sequencer.
//
// The fast hit buffer, trace cache, instruction buffer, fetch queue and L2
// cache around the sequencer are modelled in the testbench: two fixed trace
// lines (the first ending in a folded branch), an unbounded instruction
// buffer filled by the sequencer's refill writes, and an L2 that answers a
// request with its first word 32 cycles later and one word per cycle after.
// The test checks
//   * the lookup order: trace cache and instruction buffer enabled only on a
//     fast hit buffer miss, nothing looked up while the queue is full,
//   * every pushed packet: its PC follows the previous packet's next PC (or
//     the last redirect), its word and source are right, folding is applied
//     at the end of the folded line only,
//   * the L2 request address and the refill addresses,
//   * the miss latency: 37 cycles from the missing lookup to the push of the
//     word (request, 32 cycles, 3 more words, lookup again).
module tb_fetch_ctrl;
  import lptc_pkg::*;

  localparam int unsigned BURST = DEF_L2_BURST;

  logic clk = 1'b0, rst_n = 1'b0;
  logic redirect_valid;
  addr_t redirect_pc;
  logic q_full, q_push;
  fetch_pkt_t q_pkt;
  addr_t lookup_addr;
  logic fhb_en, fhb_hit, fhb_load;
  word_t fhb_word;
  trace_tag_t fhb_tag;
  logic tc_en, tc_hit;
  word_t tc_word;
  trace_tag_t tc_tag;
  logic ib_en, ib_hit, ib_fill_en;
  word_t ib_word, ib_fill_word;
  addr_t ib_fill_addr;
  logic l2_req_valid, l2_req_ready, l2_rsp_valid;
  addr_t l2_req_addr;
  word_t l2_rsp_data;
  logic ev_l2_request, ev_fold, ev_queue_stall;

  int checks = 0, failures = 0;
  int n_fhb = 0, n_tc = 0, n_ib = 0, n_fold = 0, n_stall = 0, n_redirect = 0, n_miss = 0, n_lat = 0;

  fetch_ctrl dut (.*);

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
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic word_t mem(input addr_t a);
    return (a * 3) ^ 32'h5A5A_0000;
  endfunction

  // --- trace lines held by the modelled trace cache
  trace_tag_t lines [2];
  initial begin
    lines[0] = '{valid: 1'b1, start: 32'h100, last: 32'h13C, folded: 1'b1, next_pc: 32'h300};
    lines[1] = '{valid: 1'b1, start: 32'h300, last: 32'h31C, folded: 1'b0, next_pc: 32'h320};
  end
  trace_tag_t fhb_q;

  always_comb begin
    tc_hit = 1'b0; tc_tag = '0; tc_word = '0;
    for (int i = 0; i < 2; i++)
      if (tc_en && lookup_addr >= lines[i].start && lookup_addr <= lines[i].last) begin
        tc_hit = 1'b1; tc_tag = lines[i]; tc_word = mem(lookup_addr);
      end
    fhb_hit  = fhb_en && fhb_q.valid && lookup_addr >= fhb_q.start && lookup_addr <= fhb_q.last;
    fhb_tag  = fhb_q;
    fhb_word = fhb_hit ? mem(lookup_addr) : '0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fhb_q <= '0;
    else if (fhb_load) fhb_q <= tc_tag;

  // --- instruction buffer model
  word_t ib_mem [addr_t];
  always_comb begin
    ib_hit  = ib_en && ib_mem.exists(lookup_addr);
    ib_word = ib_hit ? ib_mem[lookup_addr] : '0;
  end
  always @(posedge clk) if (ib_fill_en) ib_mem[ib_fill_addr] = ib_fill_word;

  // --- L2 model
  int    l2_timer;
  int    l2_beat;
  logic  l2_busy;
  addr_t l2_addr;
  addr_t exp_fill;
  assign l2_req_ready = !l2_busy;
  initial begin
    l2_busy = 0; l2_rsp_valid = 0; l2_rsp_data = 0;
    forever begin
      logic  acc;
      addr_t acc_addr;
      @(posedge clk);
      acc      = !l2_busy && l2_req_valid;
      acc_addr = l2_req_addr;
      #1;
      l2_rsp_valid = 0;
      if (acc) begin
        // request accepted at this edge
        l2_busy = 1; l2_addr = acc_addr; l2_timer = 32; l2_beat = 0;
      end
      if (l2_busy) begin
        l2_timer--;
        if (l2_timer <= 0) begin
          l2_rsp_valid = 1;
          l2_rsp_data  = mem(l2_addr + addr_t'(4 * l2_beat));
          l2_beat++;
          if (l2_beat == BURST) l2_busy = 0;
        end
      end
    end
  end

  // --- fetch queue model (occupancy only)
  int qcount;
  logic pop;

  // --- checker
  addr_t exp_pc;
  logic  exp_known;
  longint cyc = 0;
  longint miss_cyc;
  addr_t  miss_pc;
  logic   miss_clean;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      check(!(tc_en || ib_en) || (fhb_en && !fhb_hit), "TC/IB enabled only on FHB miss");
      check(!(q_full && fhb_en), "no lookup while queue full");
      if (ev_queue_stall) n_stall++;
      if (redirect_valid) begin
        exp_pc = redirect_pc; exp_known = 1; n_redirect++; miss_clean = 0;
      end else if (q_push) begin
        check(q_pkt.pc == exp_pc, $sformatf("pc %h, expected %h", q_pkt.pc, exp_pc));
        check(q_pkt.instr == mem(q_pkt.pc), "instruction word");
        if (q_pkt.pc >= 32'h100 && q_pkt.pc <= 32'h13C || q_pkt.pc >= 32'h300 && q_pkt.pc <= 32'h31C)
          check(q_pkt.src == SRC_FHB || q_pkt.src == SRC_TC, "source is a trace line");
        else
          check(q_pkt.src == SRC_IB, "source is the instruction buffer");
        case (q_pkt.src)
          SRC_FHB: n_fhb++;
          SRC_TC:  n_tc++;
          default: n_ib++;
        endcase
        if (q_pkt.pc == 32'h13C) begin
          check(q_pkt.folded && q_pkt.next_pc == 32'h300, "fold at end of line 0");
          n_fold++;
        end else begin
          check(!q_pkt.folded && q_pkt.next_pc == q_pkt.pc + 4, "sequential next pc");
        end
        if (q_pkt.pc == miss_pc && miss_clean) begin
          check(cyc - miss_cyc == 37, $sformatf("miss latency %0d", cyc - miss_cyc));
          n_lat++;
          miss_clean = 0;
        end
        exp_pc = q_pkt.next_pc;
      end else if (fhb_en && !fhb_hit && !tc_hit && !ib_hit) begin
        n_miss++;
        miss_cyc = cyc; miss_pc = lookup_addr; miss_clean = 1;
        exp_fill = lookup_addr;
      end
      if (l2_req_valid && l2_req_ready) check(l2_req_addr == miss_pc, "L2 request address");
      if (ib_fill_en) begin
        check(ib_fill_addr == exp_fill, "refill address");
        check(ib_fill_word == mem(ib_fill_addr), "refill word");
        exp_fill += 4;
      end
      if (q_full && miss_clean) miss_clean = 0;
    end
  end

  // queue occupancy
  always @(posedge clk) begin
    if (redirect_valid) qcount <= 0;
    else qcount <= qcount + (q_push ? 1 : 0) - (pop && qcount > 0 ? 1 : 0);
  end

  assign q_full = (qcount >= 8);

  initial begin
    redirect_valid = 0; redirect_pc = 0; pop = 0; qcount = 0;
    exp_pc = 0; exp_known = 1; miss_clean = 0; miss_pc = '1; miss_cyc = 0; exp_fill = 0;
    #12 rst_n = 1'b1;
    for (int r = 0; r < 15000; r++) begin
      @(negedge clk);
      // slow consumer in some phases, so the queue fills up
      pop = ((r / 1000) % 2 == 0) ? 1'b1 : (($urandom % 4) == 0);
      redirect_valid = (($urandom % 400) == 0) && r > 3000;
      case ($urandom % 3)
        0: redirect_pc = 32'h100;
        1: redirect_pc = 32'h000;
        default: redirect_pc = 32'h120;
      endcase
      if (r % 3000 == 2999) begin
        redirect_valid = 1; redirect_pc = 32'h0;
      end
    end
    check(n_fhb > 0 && n_tc > 0 && n_ib > 0, "all three sources used");
    check(n_fold > 0, "folding happened");
    check(n_stall > 0, "queue-full stall happened");
    check(n_redirect > 0, "redirect happened");
    check(n_miss > 0 && n_lat > 0, "L2 miss latency measured");
    $display("fhb=%0d tc=%0d ib=%0d fold=%0d stall=%0d redirect=%0d miss=%0d lat=%0d",
             n_fhb, n_tc, n_ib, n_fold, n_stall, n_redirect, n_miss, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
