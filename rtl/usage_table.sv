// usage_table: per-physical-register book-keeping for eager release.
//
// For every physical register of the leading thread the table keeps the
// fields the eager-release scheme needs: the overwrite bit (a younger
// instruction has renamed the same logical register), the in_RVQ bit (the
// committed value has been copied into the RVQ), the RVQ_address and inum
// (RVQ sequence number) of that copy, the pending_consumers counter
// (incremented when a consumer is dispatched, decremented when it leaves
// the issue queue), the ROB index of the instruction the register is
// assigned to, and the ROB index of the instruction that overwrote it. A
// ready bit (value written back) is kept as well for the issue logic.
//
// Every cycle the table finds the registers that may be released eagerly:
// allocated, value in the RVQ (hence its producer committed), overwritten,
// and no pending consumers. The lowest-numbered one is offered on er_*
// (one release per cycle is this design's choice); the leading core
// releases it and marks the overwriter's ROB entry. block_v/block_rob
// suppress a candidate whose overwriter is committing in the same cycle.
// All updates take effect at the clock edge; er_* is combinational.
module usage_table
  import rmt_pkg::*;
#(
  parameter int unsigned NUM_PREGS = NUM_PREGS_D,
  parameter int unsigned ROB_SIZE  = ROB_SIZE_D,
  localparam int unsigned CNT_W    = $clog2(2*ROB_SIZE+1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NUM_PREGS-1:0] free_vec,
  // rename: new destination register
  input  logic          alloc_v,
  input  preg_t         alloc_preg,
  input  rob_idx_t      alloc_rob,
  // rename: old mapping of the destination is overwritten
  input  logic          ow_v,
  input  preg_t         ow_preg,
  input  rob_idx_t      ow_rob,
  // dispatch: consumers of the sources
  input  logic          inc1_v,
  input  preg_t         inc1_preg,
  input  logic          inc2_v,
  input  preg_t         inc2_preg,
  // issue (or squash of an unissued consumer): consumers leave
  input  logic          dec1_v,
  input  preg_t         dec1_preg,
  input  logic          dec2_v,
  input  preg_t         dec2_preg,
  // writeback
  input  logic          wb_v,
  input  preg_t         wb_preg,
  // commit: value copied into the RVQ
  input  logic          cm_v,
  input  preg_t         cm_preg,
  input  rvq_addr_t     cm_addr,
  input  seq_t          cm_inum,
  // squash of the overwriter without an eager release
  input  logic          owc_v,
  input  preg_t         owc_preg,
  // recovery re-instates an eagerly released register
  input  logic          ri_v,
  input  preg_t         ri_preg,
  input  rvq_addr_t     ri_addr,
  input  seq_t          ri_inum,
  input  rob_idx_t      ri_owner,
  // eager-release candidate
  input  logic          block_v,
  input  rob_idx_t      block_rob,
  output logic          er_valid,
  output preg_t         er_preg,
  output rob_idx_t      er_owr_rob,
  output seq_t          er_inum,
  output rvq_addr_t     er_addr,
  output logic [NUM_PREGS-1:0] ready_vec,
  output logic [CNT_W-1:0] pending [NUM_PREGS]
);
  typedef struct packed {
    logic      overwrite;
    logic      in_rvq;
    rvq_addr_t rvq_addr;
    seq_t      inum;
    rob_idx_t  owner_rob;
    rob_idx_t  owr_rob;
  } ut_entry_t;

  ut_entry_t ut [NUM_PREGS];
  logic [NUM_PREGS-1:0] eligible;

  always_comb begin
    er_valid   = 1'b0;
    er_preg    = '0;
    er_owr_rob = '0;
    er_inum    = '0;
    er_addr    = '0;
    for (int p = 0; p < NUM_PREGS; p++)
      eligible[p] = !free_vec[p] && ut[p].in_rvq && ut[p].overwrite &&
                    (pending[p] == '0) &&
                    !(block_v && ut[p].owr_rob == block_rob);
    for (int p = NUM_PREGS - 1; p >= 0; p--) begin
      if (eligible[p]) begin
        er_valid   = 1'b1;
        er_preg    = preg_t'(p);
        er_owr_rob = ut[p].owr_rob;
        er_inum    = ut[p].inum;
        er_addr    = ut[p].rvq_addr;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < NUM_PREGS; p++) begin
        ut[p]        <= '0;
        pending[p]   <= '0;
        ready_vec[p] <= 1'b1;
      end
    end else begin
      for (int p = 0; p < NUM_PREGS; p++) begin
        logic [CNT_W-1:0] d;
        d = pending[p];
        if (inc1_v && inc1_preg == preg_t'(p)) d = d + 1'b1;
        if (inc2_v && inc2_preg == preg_t'(p)) d = d + 1'b1;
        if (dec1_v && dec1_preg == preg_t'(p)) d = d - 1'b1;
        if (dec2_v && dec2_preg == preg_t'(p)) d = d - 1'b1;
        pending[p] <= d;
      end
      if (wb_v) ready_vec[wb_preg] <= 1'b1;
      if (cm_v) begin
        ut[cm_preg].in_rvq   <= 1'b1;
        ut[cm_preg].rvq_addr <= cm_addr;
        ut[cm_preg].inum     <= cm_inum;
      end
      if (ow_v) begin
        ut[ow_preg].overwrite <= 1'b1;
        ut[ow_preg].owr_rob   <= ow_rob;
      end
      if (owc_v) ut[owc_preg].overwrite <= 1'b0;
      if (alloc_v) begin
        ut[alloc_preg]        <= '{overwrite: 1'b0, in_rvq: 1'b0, rvq_addr: '0,
                                   inum: '0, owner_rob: alloc_rob, owr_rob: '0};
        ready_vec[alloc_preg] <= 1'b0;
      end
      if (ri_v) begin
        ut[ri_preg]        <= '{overwrite: 1'b0, in_rvq: 1'b1, rvq_addr: ri_addr,
                                inum: ri_inum, owner_rob: ri_owner, owr_rob: '0};
        ready_vec[ri_preg] <= 1'b1;
        pending[ri_preg]   <= '0;
      end
    end
  end

  // Every consumer that leaves was counted when it arrived.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
      (dec1_v |-> pending[dec1_preg] != '0) and
      (dec2_v |-> pending[dec2_preg] != '0));
endmodule
