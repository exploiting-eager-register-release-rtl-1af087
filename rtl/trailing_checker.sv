// trailing_checker: the checking stage and register file of the trailing
// (redundant) thread.
//
// Each cycle the trailing pipeline may present one result it computed
// (res_valid, res_lreg, res_value). It is compared with the head of the
// register value queue, which carries the leader's result for the same
// instruction. On agreement the checked value is written into the trailer
// register file and the RVQ entry is popped; on disagreement error pulses,
// the register file keeps its checked state (which recovery would start
// from) and the entry is popped as well. res_ready is high while an RVQ
// entry is waiting. The register file has a combinational read port that
// the leader uses to copy an eagerly released value back when the trailer
// has already consumed the RVQ entry. inj_* flips one bit of one trailer
// register to model a soft error, as in the fault-injection study.
// Compare-then-write and the register-file reset to zero are this design's
// choices; the register file is not ECC-protected, like the baseline.
module trailing_checker
  import rmt_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // trailing pipeline result
  input  logic  res_valid,
  input  lreg_t res_lreg,
  input  xlen_t res_value,
  output logic  res_ready,
  // RVQ head
  input  logic  rvq_empty,
  input  lreg_t rvq_lreg,
  input  xlen_t rvq_value,
  output logic  rvq_pop,
  // outcome
  output logic  error,
  // copy-back read port
  input  lreg_t rd_lreg,
  output xlen_t rd_value,
  // soft-error injection
  input  logic  inj_valid,
  input  lreg_t inj_lreg,
  input  logic [5:0] inj_bit
);
  xlen_t trf [NUM_LREGS];

  wire   check = res_valid && !rvq_empty;
  wire   match = (res_lreg == rvq_lreg) && (res_value == rvq_value);

  assign res_ready = !rvq_empty;
  assign rvq_pop   = check;
  assign error     = check && !match;
  assign rd_value  = trf[rd_lreg];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_LREGS; i++) trf[i] <= '0;
    end else begin
      if (check && match) trf[res_lreg] <= res_value;
      if (inj_valid) trf[inj_lreg][inj_bit] <= ~trf[inj_lreg][inj_bit];
    end
  end

  a_res_has_partner: assert property (@(posedge clk) disable iff (rst)
                                      res_valid |-> res_ready);

endmodule
