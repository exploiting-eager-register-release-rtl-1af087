// store_buffer: holds the leading thread's committed stores until the
// trailing thread has produced the same store, then writes memory.
//
// With asymmetric commit the leader commits stores here instead of to
// memory. The trailer sends its store (address and data) when it commits
// it; that store is compared with the oldest buffered leader store. On a
// match the store is written to memory (mem_we for one cycle); on a
// mismatch nothing is written and error pulses for one cycle, since one of
// the two copies was hit by a fault. Either way the entry leaves the
// buffer. trl_ready is high when a leader store is waiting. The depth is
// not given by the paper and is this design's choice (64).
module store_buffer
  import rmt_pkg::*;
#(
  parameter int unsigned DEPTH = STB_DEPTH_D
) (
  input  logic   clk,
  input  logic   rst,
  // leader commit side
  input  logic   ld_push,
  input  store_t ld_store,
  output logic   full,
  // trailer side
  input  logic   trl_valid,
  input  store_t trl_store,
  output logic   trl_ready,
  // memory side
  output logic   mem_we,
  output xlen_t  mem_addr,
  output xlen_t  mem_data,
  output logic   error,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  store_t head;
  logic   empty;

  wire check = trl_valid && !empty;

  sync_fifo #(.WIDTH($bits(store_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push(ld_push), .wdata(ld_store),
    .pop(check), .rdata(head),
    .full, .empty, .count
  );

  assign trl_ready = !empty;
  assign mem_we    = check && (head == trl_store);
  assign error     = check && (head != trl_store);
  assign mem_addr  = head.addr;
  assign mem_data  = head.data;

  // A trailer store may only be offered while a leader store is waiting.
  a_trl_has_partner: assert property (@(posedge clk) disable iff (rst)
                                      trl_valid |-> trl_ready);

endmodule
