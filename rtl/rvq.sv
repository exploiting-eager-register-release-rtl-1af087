// rvq: register value queue between the leading and the trailing thread.
//
// The leader pushes one entry per committed register-writing instruction:
// the logical register, its result and (for the in-order trailer's value
// prediction) the two source operand values. The trailer pops entries in
// order after checking them. Besides the FIFO ports the queue has a random
// read port used by eager-release recovery: the leader keeps the address
// and the sequence number (inum) of every value it pushed, and rd_present
// tells whether that entry is still in the queue (not yet consumed by the
// trailer). push_addr/push_seq give the slot and number of the entry being
// pushed this cycle. Depth 600 follows the evaluated configuration; the
// sequence-number scheme and the present test are this design's choice.
// Reads are combinational, writes take effect at the clock edge.
module rvq
  import rmt_pkg::*;
#(
  parameter int unsigned DEPTH = RVQ_DEPTH_D,
  localparam int unsigned CW   = $clog2(DEPTH+1)
) (
  input  logic          clk,
  input  logic          rst,
  // leader side
  input  logic          push,
  input  lreg_t         push_lreg,
  input  xlen_t         push_value,
  input  xlen_t         push_src1,
  input  xlen_t         push_src2,
  output rvq_addr_t     push_addr,
  output seq_t          push_seq,
  output logic          full,
  // trailer side
  input  logic          pop,
  output logic          empty,
  output lreg_t         head_lreg,
  output xlen_t         head_value,
  output xlen_t         head_src1,
  output xlen_t         head_src2,
  output seq_t          head_seq,
  // recovery read
  input  rvq_addr_t     rd_addr,
  input  seq_t          rd_seq,
  output xlen_t         rd_value,
  output logic          rd_present,
  output logic [CW-1:0] count
);
  typedef struct packed {
    lreg_t lreg;
    xlen_t value;
    xlen_t src1;
    xlen_t src2;
  } entry_t;

  entry_t        mem [DEPTH];
  rvq_addr_t wptr, rptr;
  seq_t          wseq;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  function automatic rvq_addr_t incr(input rvq_addr_t p);
    return (p == rvq_addr_t'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full       = (count == CW'(DEPTH));
  assign empty      = (count == '0);
  assign push_addr  = wptr;
  assign push_seq   = wseq;
  assign head_seq   = wseq - seq_t'(count);
  assign head_lreg  = mem[rptr].lreg;
  assign head_value = mem[rptr].value;
  assign head_src1  = mem[rptr].src1;
  assign head_src2  = mem[rptr].src2;
  assign rd_value   = mem[rd_addr].value;

  // Entry rd_seq is still queued when it is younger than the head.
  seq_t seq_gap;
  assign seq_gap       = rd_seq - head_seq;
  assign rd_present = (seq_gap < seq_t'(count));

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      wseq  <= '0;
      count <= '0;
    end else begin
      if (do_push) begin
        wptr <= incr(wptr);
        wseq <= wseq + 1'b1;
      end
      if (do_pop) rptr <= incr(rptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wptr] <= '{lreg: push_lreg, value: push_value,
                                src1: push_src1, src2: push_src2};

endmodule
