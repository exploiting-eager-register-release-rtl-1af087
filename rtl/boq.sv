// boq: branch outcome queue from the leading to the trailing thread.
//
// The leader pushes the outcome (taken bit and target) of every committed
// branch; the trailer pops them in order and uses them as perfect branch
// predictions. Its values are only hints that the trailer's own execution
// confirms, so it carries no ECC. Depth 200 follows the evaluated
// configuration. FIFO timing is that of sync_fifo (fall-through head).
module boq
  import rmt_pkg::*;
#(
  parameter int unsigned DEPTH = BOQ_DEPTH_D
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       push,
  input  boq_entry_t push_entry,
  output logic       full,
  input  logic       pop,
  output logic       empty,
  output boq_entry_t head_entry,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  sync_fifo #(.WIDTH($bits(boq_entry_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push, .wdata(push_entry),
    .pop, .rdata(head_entry),
    .full, .empty, .count
  );
endmodule
