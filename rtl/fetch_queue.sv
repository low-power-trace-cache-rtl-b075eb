// fetch_queue -- instruction fetch queue between the fetch unit and the
// integer unit.
//
// A circular FIFO of DEPTH fetch packets (pc, instruction, the address the
// fetch unit went on to, whether that address came from a folded branch, and
// the structure the word was read from). The fetch unit pushes at most one
// packet per cycle and stops while the queue is full; the core pops at most
// one per cycle, matching a decode bandwidth of one. A flush, issued when the
// core redirects fetch, empties the queue in one cycle and overrides a push
// or pop in that cycle.
//
// Interface: push/full on the write side, pop_valid/pop_ready/pop_pkt on the
// read side (pop_pkt is the head, valid while pop_valid). Reset empties it.
//
// From the paper: the depth of 8. Everything else is this design's choice.
module fetch_queue
  import lptc_pkg::*;
#(
  parameter int unsigned DEPTH = lptc_pkg::DEF_IFQ_DEPTH
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       push,
  input  fetch_pkt_t push_pkt,
  output logic       full,
  output logic       pop_valid,
  input  logic       pop_ready,
  output fetch_pkt_t pop_pkt
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  fetch_pkt_t        mem_q [DEPTH];
  logic [PTR_W-1:0]  rd_q, wr_q;
  logic [CNT_W-1:0]  cnt_q;
  logic              do_push, do_pop;

  assign full      = (cnt_q == CNT_W'(DEPTH));
  assign pop_valid = (cnt_q != '0);
  assign pop_pkt   = mem_q[rd_q];
  assign do_push   = push && !full && !flush;
  assign do_pop    = pop_valid && pop_ready && !flush;

  function automatic logic [PTR_W-1:0] incr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else if (flush) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= incr(wr_q);
      if (do_pop)  rd_q <= incr(rd_q);
      case ({do_push, do_pop})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: cnt_q <= cnt_q;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem_q[wr_q] <= push_pkt;
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(push && full && !flush));

endmodule
