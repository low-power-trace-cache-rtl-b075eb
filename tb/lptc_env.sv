// lptc_env -- test environment for one configuration of the fetch unit.
//
// Holds the same kind of generated program, behavioural core and L2 model as
// tb_lptc_top, around an lptc_top with TC_ENTRIES trace lines and IB_ENTRIES
// instruction buffer words. The program's 80 loop regions are run PASSES
// times by an outer loop, so that the trace cache's capacity matters. When
// the program halts it checks the completed PC stream against a reference
// run, raises `done` and reports its check and failure counts and the hit
// counts of the three structures. It does not call $finish; the testbench
// that instantiates it does.
module lptc_env
  import lptc_pkg::*;
#(
  parameter int unsigned TC_ENTRIES = 256,
  parameter int unsigned IB_ENTRIES = 32,
  parameter int          PASSES     = 3
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   fetches,
  output int   fhb_hits,
  output int   tc_hits,
  output int   ib_hits
);


  localparam int unsigned NWORDS = 8192;
  localparam int unsigned BURST  = DEF_L2_BURST;
  localparam int unsigned LAT    = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic l2_req_valid, l2_req_ready, l2_rsp_valid;
  addr_t l2_req_addr;
  word_t l2_rsp_data;
  logic deq_valid, deq_ready;
  fetch_pkt_t deq_pkt;
  logic redirect_valid;
  addr_t redirect_pc;
  retire_t ret;
  lptc_events_t events;

  lptc_top #(.TC_ENTRIES(TC_ENTRIES), .IB_ENTRIES(IB_ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  longint cycles = 0;
  initial begin
    done = 1'b0; checks = 0; failures = 0;
    fetches = 0; fhb_hits = 0; tc_hits = 0; ib_hits = 0;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask


  // ------------------------------------------------------------ program
  word_t prog [NWORDS];

  localparam logic [2:0] OP_PLAIN = 3'd0, OP_COND = 3'd1, OP_JUMP = 3'd2,
                         OP_CALL = 3'd3, OP_RET = 3'd4, OP_HALT = 3'd7;

  int gp;  // generator word pointer

  task automatic emit(input word_t w);
    prog[gp] = w;
    gp++;
  endtask
  // Fixed-seed generator, so every configuration runs the same program.
  int unsigned lcg = 32'd12345;
  function automatic int unsigned rnd();
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return lcg >> 8;
  endfunction

  task automatic emit_plain(input int n);
    for (int i = 0; i < n; i++) emit({OP_PLAIN, 29'(rnd())});
  endtask
  function automatic word_t cond_word(input int from, input int to, input int trip, input logic alt);
    int off = to - from;
    return {OP_COND, alt, 4'(trip), 8'h00, 16'(off)};
  endfunction

  localparam int SUB_BASE = 7000;

  task automatic gen_program;
    for (int i = 0; i < NWORDS; i++) prog[i] = {OP_HALT, 29'd0};
    gp = 0;
    for (int r = 0; r < 80; r++) begin
      int body, fwd, jmp;
      body = gp;
      emit_plain(3 + rnd() % 8);
      if (r % 3 == 0) emit({OP_CALL, 9'd0, 20'(SUB_BASE + 16 * (r % 4))});
      emit_plain(1 + rnd() % 5);
      fwd = gp;
      emit(32'h0);                  // forward conditional, patched below
      emit_plain(2);
      prog[fwd] = cond_word(fwd, gp, 2, 1'b1);
      if (r % 4 == 1) emit_plain(25);
      jmp = gp;
      emit(32'h0);                  // jump over three filler words
      emit_plain(3);
      prog[jmp] = {OP_JUMP, 9'd0, 20'(gp)};
      emit_plain(2 + rnd() % 5);
      emit(cond_word(gp, body + 2 * (r % 2), 3 + r % 3, 1'b0));  // odd regions: loop entry after a 2-word preamble
    end
    emit(cond_word(gp, 0, PASSES, 1'b0));  // outer loop over all regions
    emit({OP_HALT, 29'd0});
    for (int k = 0; k < 4; k++) begin
      gp = SUB_BASE + 16 * k;
      emit_plain(3 + k);
      emit({OP_RET, 29'd0});
    end
  endtask

  // ------------------------------------------------------ architectural model
  class arch_model;
    int unsigned cnt [int];
    addr_t stack [$];

    // Executes the instruction at pc; returns its next pc.
    function automatic addr_t step(input addr_t pc, output ctrl_kind_e kind,
                                   output logic taken, output addr_t target,
                                   output logic halt);
      word_t w = prog[pc >> 2];
      logic [2:0] op = w[31:29];
      addr_t nxt = pc + 4;
      kind = K_PLAIN; taken = 1'b0; target = pc + 4; halt = 1'b0;
      case (op)
        OP_COND: begin
          int unsigned c = cnt.exists(int'(pc)) ? cnt[int'(pc)] : 0;
          int trip = int'(w[27:24]);
          kind   = K_COND;
          target = pc + addr_t'(4 * $signed(w[15:0]));
          if (w[28]) taken = (c % 2) == 0;
          else       taken = (c % trip) != (trip - 1);
          cnt[int'(pc)] = c + 1;
          if (taken) nxt = target;
        end
        OP_JUMP: begin
          kind = K_JUMP; taken = 1'b1; target = {w[19:0], 2'b00}; nxt = target;
        end
        OP_CALL: begin
          kind = K_OTHER; taken = 1'b1; target = {w[19:0], 2'b00}; nxt = target;
          stack.push_back(pc + 4);
        end
        OP_RET: begin
          kind = K_OTHER; taken = 1'b1;
          target = (stack.size() != 0) ? stack.pop_back() : 32'h0;
          nxt = target;
        end
        OP_HALT: begin
          kind = K_OTHER; halt = 1'b1; nxt = pc;
        end
        default: ;
      endcase
      return nxt;
    endfunction
  endclass

  arch_model golden, arch;
  addr_t golden_seq [$];

  // ------------------------------------------------------------ L2 model
  logic  l2_busy;
  int    l2_timer, l2_beat;
  addr_t l2_addr;
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
        l2_busy = 1; l2_addr = acc_addr; l2_timer = LAT; l2_beat = 0;
      end
      if (l2_busy) begin
        l2_timer--;
        if (l2_timer <= 0) begin
          l2_rsp_valid = 1;
          l2_rsp_data  = prog[((l2_addr >> 2) + l2_beat) % NWORDS];
          l2_beat++;
          if (l2_beat == BURST) l2_busy = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_fhb = 0, n_tc = 0, n_ib = 0, n_l2 = 0, n_tcw = 0, n_tcw_fold = 0, n_tcw_full = 0;
  int n_partial = 0, n_fold = 0, n_stall = 0, n_redirect = 0, n_fhb_lookup = 0, n_tc_lookup = 0;
  int n_ib_lookup = 0, n_retired = 0, n_folded_jumps = 0, n_fetched = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      if (events.fhb_lookup) n_fhb_lookup++;
      if (events.fhb_hit) n_fhb++;
      if (events.tc_lookup) n_tc_lookup++;
      if (events.tc_hit) begin
        n_tc++;
        if (dut.tc_tag.start != dut.lookup_addr) n_partial++;
      end
      if (events.ib_lookup) n_ib_lookup++;
      if (events.ib_hit && !events.tc_hit) n_ib++;
      if (events.l2_request) n_l2++;
      if (events.tc_write) begin
        n_tcw++;
        if (dut.tc_write_tag.folded) n_tcw_fold++;
        if (dut.tc_write_tag.last - dut.tc_write_tag.start == addr_t'(4 * (DEF_TRACE_LEN - 1))) n_tcw_full++;
      end
      if (events.fold) n_fold++;
      if (events.queue_stall) n_stall++;
      check(!(events.tc_lookup && events.fhb_hit), "trace cache looked up on a fast hit buffer hit");
    end
  end

  // ------------------------------------------------------------ core model
  addr_t arch_pc;
  logic  halted;
  int    gidx;

  task automatic retire_one(input addr_t pc);
    check(gidx < golden_seq.size() && golden_seq[gidx] == pc,
          $sformatf("completed pc %h, reference %h", pc, gidx < golden_seq.size() ? golden_seq[gidx] : 0));
    gidx++;
  endtask

  initial begin
    ctrl_kind_e kind, jkind;
    logic taken, halt, jtaken, jhalt;
    addr_t target, nxt, jtarget;
    fetch_pkt_t pkt;

    gen_program();
    golden = new();
    arch   = new();
    // independent reference run
    begin
      addr_t p = 0;
      for (int i = 0; i < 200000; i++) begin
        golden_seq.push_back(p);
        p = golden.step(p, kind, taken, target, halt);
        if (halt) break;
      end
    end
    $display("reference run: %0d instructions", golden_seq.size());

    deq_ready = 0; redirect_valid = 0; redirect_pc = 0; ret = '0;
    arch_pc = 0; halted = 0; gidx = 0;
    #12 rst_n = 1'b1;
    while (!halted) begin
      @(negedge clk);
      deq_ready = 0; redirect_valid = 0; ret = '0;
      if (deq_valid && ($urandom % 8) != 0) begin
        pkt = deq_pkt;
        deq_ready = 1;
        n_fetched++;
        check(pkt.pc == arch_pc, $sformatf("fetched pc %h, core expects %h", pkt.pc, arch_pc));
        check(pkt.instr == prog[(pkt.pc >> 2) % NWORDS], $sformatf("word at %h", pkt.pc));
        retire_one(pkt.pc);
        nxt = arch.step(pkt.pc, kind, taken, target, halt);
        n_retired++;
        ret = '{valid: 1'b1, pc: pkt.pc, instr: pkt.instr, kind: kind, taken: taken,
                target: target, src: pkt.src};
        if (pkt.folded && nxt == pkt.pc + 4 && !halt) begin
          // the folded jump completes together with this instruction
          check(prog[(nxt >> 2) % NWORDS][31:29] == OP_JUMP, "folded word is a jump");
          retire_one(nxt);
          nxt = arch.step(nxt, jkind, jtaken, jtarget, jhalt);
          check(nxt == pkt.next_pc, "folded target");
          n_folded_jumps++;
          n_retired++;
        end
        if (halt) halted = 1;
        else if (nxt != pkt.next_pc) begin
          redirect_valid = 1; redirect_pc = nxt; n_redirect++;
        end
        arch_pc = nxt;
      end
    end
    @(negedge clk);
    deq_ready = 0; redirect_valid = 0; ret = '0;
    repeat (3) @(negedge clk);

    check(gidx == golden_seq.size(), $sformatf("%0d of %0d instructions completed", gidx, golden_seq.size()));
    check(n_tc_lookup == n_fhb_lookup - n_fhb, "trace cache looked up exactly on fast hit buffer misses");
    fetches  = n_fhb_lookup;
    fhb_hits = n_fhb;
    tc_hits  = n_tc;
    ib_hits  = n_ib;
    $display("t%0d/i%0d: cycles=%0d completed=%0d lookups=%0d fhb=%0d tc=%0d ib=%0d l2=%0d trace_writes=%0d",
             TC_ENTRIES, IB_ENTRIES, cycles, n_retired, n_fhb_lookup, n_fhb, n_tc, n_ib, n_l2, n_tcw);
    done = 1'b1;
  end
endmodule
