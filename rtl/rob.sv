// rob: reorder buffer of the leading thread.
//
// A circular buffer of ROB_SIZE entries (160 per thread in the evaluated
// configuration) allocated in program order at rename and retired in order
// from the head. Besides the usual fields (destination mappings new and
// old, completion, source registers) an entry records the eager release
// its instruction caused (de-allocate bit, inum, RVQ address; old_preg and
// lreg name the released register), so that a squash of the instruction
// can re-instate the old value. Source operand values captured at issue
// travel with the entry because the trailer receives them through the RVQ
// for value prediction.
//
// Ports: alloc appends at the tail (alloc_idx is its index); issue, wb and
// mk update the entry they index; commit drops the head; squash_step drops
// the youngest entry (last_*), so a recovery walk removes one entry per
// cycle. head_entry, last_entry and iss_entry are combinational reads; all
// updates take effect at the clock edge.
module rob
  import rmt_pkg::*;
#(
  parameter int unsigned ROB_SIZE = ROB_SIZE_D,
  localparam int unsigned CW      = $clog2(ROB_SIZE+1)
) (
  input  logic       clk,
  input  logic       rst,
  // allocate
  input  logic       alloc_v,
  input  rob_entry_t alloc_entry,
  output rob_idx_t   alloc_idx,
  output logic       full,
  // issue: operand values read
  input  logic       iss_v,
  input  rob_idx_t   iss_idx,
  input  xlen_t      iss_val1,
  input  xlen_t      iss_val2,
  output rob_entry_t iss_entry,
  // writeback
  input  logic       wb_v,
  input  rob_idx_t   wb_idx,
  input  xlen_t      wb_aux,
  input  logic       wb_taken,
  // eager-release mark
  input  logic       mk_v,
  input  rob_idx_t   mk_idx,
  input  seq_t       mk_inum,
  input  rvq_addr_t  mk_addr,
  // head / commit
  output logic       empty,
  output rob_idx_t   head_idx,
  output rob_entry_t head_entry,
  input  logic       commit,
  // youngest entry / squash walk
  output rob_idx_t   last_idx,
  output rob_entry_t last_entry,
  input  logic       squash_step,
  output logic [CW-1:0] count
);
  rob_entry_t mem [ROB_SIZE];
  rob_idx_t   head, tail;

  function automatic rob_idx_t incr(input rob_idx_t p);
    return (p == rob_idx_t'(ROB_SIZE - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic rob_idx_t decr(input rob_idx_t p);
    return (p == '0) ? rob_idx_t'(ROB_SIZE - 1) : p - 1'b1;
  endfunction

  assign full       = (count == CW'(ROB_SIZE));
  assign empty      = (count == '0);
  assign alloc_idx  = tail;
  assign head_idx   = head;
  assign head_entry = mem[head];
  assign last_idx   = decr(tail);
  assign last_entry = mem[decr(tail)];
  assign iss_entry  = mem[iss_idx];

  wire do_alloc = alloc_v && !full;
  wire do_com   = commit && !empty;
  wire do_sq    = squash_step && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_alloc)    tail <= incr(tail);
      else if (do_sq)  tail <= decr(tail);
      if (do_com)      head <= incr(head);
      count <= count + CW'(do_alloc)
                     - CW'(do_com) - CW'(do_sq && !do_alloc);
    end
  end

  always_ff @(posedge clk) begin
    if (do_alloc) begin
      mem[tail]          <= alloc_entry;
      mem[tail].complete <= 1'b0;
      mem[tail].issued   <= 1'b0;
      mem[tail].dealloc  <= 1'b0;
    end
    if (iss_v) begin
      mem[iss_idx].issued   <= 1'b1;
      mem[iss_idx].src1_val <= iss_val1;
      mem[iss_idx].src2_val <= iss_val2;
    end
    if (wb_v) begin
      mem[wb_idx].complete <= 1'b1;
      mem[wb_idx].aux      <= wb_aux;
      mem[wb_idx].taken    <= wb_taken;
    end
    if (mk_v) begin
      mem[mk_idx].dealloc  <= 1'b1;
      mem[mk_idx].inum     <= mk_inum;
      mem[mk_idx].rvq_addr <= mk_addr;
    end
  end

  a_no_alloc_and_squash: assert property (@(posedge clk) disable iff (rst)
                                          !(alloc_v && squash_step));
  a_commit_complete: assert property (@(posedge clk) disable iff (rst)
                                      commit |-> !empty && head_entry.complete);
endmodule
