// lvq: load value queue from the leading to the trailing thread.
//
// The trailer never reads the data cache: it takes every load value from
// this queue, so the queue must be ECC-protected (it is outside the checked
// sphere of replication). Each 64-bit value is stored as a 72-bit SEC-DED
// Hamming codeword; the head is decoded on the way out, a single-bit error
// is corrected (corrected_err) and a double-bit error is flagged
// (uncorrectable_err). The SEC-DED code is this design's choice; the paper
// only requires ECC. inj_flip lets a test flip stored bits of the head
// entry to model a soft error. Depth 400 follows the evaluated
// configuration. FIFO timing is that of sync_fifo (fall-through head).
module lvq
  import rmt_pkg::*;
#(
  parameter int unsigned DEPTH = LVQ_DEPTH_D
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  xlen_t            push_value,
  output logic             full,
  input  logic             pop,
  output logic             empty,
  output xlen_t            head_value,
  output logic             corrected_err,
  output logic             uncorrectable_err,
  input  logic [ECC_W-1:0] inj_flip
);
  logic [ECC_W-1:0]             stored;
  logic [$clog2(DEPTH+1)-1:0]   count;

  sync_fifo #(.WIDTH(ECC_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .push, .wdata(ecc_encode(push_value)),
    .pop, .rdata(stored),
    .full, .empty, .count
  );

  always_comb begin
    logic s, d;
    head_value        = ecc_decode(stored ^ inj_flip, s, d);
    corrected_err     = s && !empty;
    uncorrectable_err = d && !empty;
  end

endmodule
