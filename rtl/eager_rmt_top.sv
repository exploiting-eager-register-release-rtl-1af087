// eager_rmt_top: a single-thread chip-level redundantly threaded processor
// with recovery (ST-P-CRTR), register side, with eager register release in
// the leading thread.
//
// The leading core (rename, ROB, usage table, physical register file and
// the eager-release and recovery control) commits into three queues to
// the trailing core: the register value queue (results plus source
// operands), the ECC-protected load value queue and the branch outcome
// queue. Committed stores wait in the store buffer until the trailer
// produces the same store. The trailing checker compares the trailer's
// results with the RVQ and keeps the checked register state, which the
// leader reads back when it re-instates an eagerly released register whose
// RVQ entry has already been consumed.
//
// The pipelines around this (fetch and branch prediction, issue queue and
// functional units of the leader, the whole in-order trailing pipeline,
// caches and memory) are outside this module: their signals are ports.
// Ports named ren_*, iss_*, wb_* belong to the leader's pipeline; trl_*
// to the trailing pipeline; mem_* to memory; ev_* are one-cycle event
// strobes for performance counting. Widths of indices come from rmt_pkg.
module eager_rmt_top
  import rmt_pkg::*;
#(
  parameter int unsigned NUM_PREGS = NUM_PREGS_D,
  parameter int unsigned ROB_SIZE  = ROB_SIZE_D,
  parameter int unsigned RVQ_DEPTH = RVQ_DEPTH_D,
  parameter int unsigned LVQ_DEPTH = LVQ_DEPTH_D,
  parameter int unsigned BOQ_DEPTH = BOQ_DEPTH_D,
  parameter int unsigned STB_DEPTH = STB_DEPTH_D
) (
  input  logic        clk,
  input  logic        rst,
  // leader: rename / dispatch
  input  logic        ren_v,
  input  rename_req_t ren_req,
  output logic        ren_ready,
  output rob_idx_t    ren_rob,
  output preg_t       ren_dest_preg,
  output preg_t       ren_src1_preg,
  output preg_t       ren_src2_preg,
  output logic [NUM_PREGS-1:0] preg_ready,
  // leader: issue
  input  logic        iss_v,
  input  rob_idx_t    iss_rob,
  output xlen_t       iss_val1,
  output xlen_t       iss_val2,
  // leader: writeback
  input  logic        wb_v,
  input  rob_idx_t    wb_rob,
  input  preg_t       wb_preg,
  input  logic        wb_has_dest,
  input  xlen_t       wb_value,
  input  xlen_t       wb_aux,
  input  logic        wb_taken,
  input  logic        wb_mispredict,
  output logic        recovering,
  // trailer: register results and value prediction
  input  logic        trl_res_valid,
  input  lreg_t       trl_res_lreg,
  input  xlen_t       trl_res_value,
  output logic        trl_res_ready,
  output lreg_t       trl_pred_lreg,
  output xlen_t       trl_pred_src1,
  output xlen_t       trl_pred_src2,
  output logic        trl_reg_error,
  // trailer: loads
  input  logic        trl_load_pop,
  output logic        trl_load_valid,
  output xlen_t       trl_load_value,
  output logic        lvq_corrected,
  output logic        lvq_uncorrectable,
  input  logic [ECC_W-1:0] lvq_inj_flip,
  // trailer: branches
  input  logic        trl_br_pop,
  output logic        trl_br_valid,
  output boq_entry_t  trl_br_entry,
  // trailer: stores
  input  logic        trl_st_valid,
  input  store_t      trl_st,
  output logic        trl_st_ready,
  output logic        trl_st_error,
  // memory writes of checked stores
  output logic        mem_we,
  output xlen_t       mem_addr,
  output xlen_t       mem_data,
  // soft-error injection into the trailer register file
  input  logic        inj_valid,
  input  lreg_t       inj_lreg,
  input  logic [5:0]  inj_bit,
  // events and occupancy
  output logic        ev_commit,
  output logic        ev_eager_release,
  output logic        ev_conv_release,
  output logic        ev_copyback_rvq,
  output logic        ev_copyback_trf,
  output logic        ev_squash,
  output logic        ev_stall_noreg,
  output logic        ev_stall_queue,
  output logic [$clog2(NUM_PREGS+1)-1:0] free_count,
  output logic [$clog2(RVQ_DEPTH+1)-1:0] rvq_count
);
  logic       rvq_push, rvq_full, rvq_empty, rvq_pop, rvq_rd_present;
  lreg_t      rvq_lreg, rvq_head_lreg, trf_rd_lreg;
  xlen_t      rvq_value, rvq_src1, rvq_src2, rvq_head_value, rvq_rd_value, trf_rd_value;
  rvq_addr_t  rvq_push_addr, rvq_rd_addr;
  seq_t       rvq_push_seq, rvq_rd_seq, rvq_head_seq;
  logic       lvq_push, lvq_full, lvq_empty;
  xlen_t      lvq_value;
  logic       boq_push, boq_full, boq_empty;
  boq_entry_t boq_entry;
  logic       stb_push, stb_full;
  store_t     stb_store;
  logic [$clog2(BOQ_DEPTH+1)-1:0] boq_count;
  logic [$clog2(STB_DEPTH+1)-1:0] stb_count;

  leading_core #(.NUM_PREGS(NUM_PREGS), .ROB_SIZE(ROB_SIZE)) u_lead (
    .clk, .rst,
    .ren_v, .ren_req, .ren_ready, .ren_rob, .ren_dest_preg, .ren_src1_preg,
    .ren_src2_preg, .preg_ready,
    .iss_v, .iss_rob, .iss_val1, .iss_val2,
    .wb_v, .wb_rob, .wb_preg, .wb_has_dest, .wb_value, .wb_aux, .wb_taken,
    .wb_mispredict, .recovering,
    .rvq_push, .rvq_lreg, .rvq_value, .rvq_src1, .rvq_src2, .rvq_push_addr,
    .rvq_push_seq, .rvq_full, .rvq_rd_addr, .rvq_rd_seq, .rvq_rd_value,
    .rvq_rd_present,
    .lvq_push, .lvq_value, .lvq_full,
    .boq_push, .boq_entry, .boq_full,
    .stb_push, .stb_store, .stb_full,
    .trf_rd_lreg, .trf_rd_value,
    .ev_commit, .ev_eager_release, .ev_conv_release, .ev_copyback_rvq,
    .ev_copyback_trf, .ev_squash, .ev_stall_noreg, .ev_stall_queue, .free_count
  );

  rvq #(.DEPTH(RVQ_DEPTH)) u_rvq (
    .clk, .rst,
    .push(rvq_push), .push_lreg(rvq_lreg), .push_value(rvq_value),
    .push_src1(rvq_src1), .push_src2(rvq_src2),
    .push_addr(rvq_push_addr), .push_seq(rvq_push_seq), .full(rvq_full),
    .pop(rvq_pop), .empty(rvq_empty), .head_lreg(rvq_head_lreg),
    .head_value(rvq_head_value), .head_src1(trl_pred_src1), .head_src2(trl_pred_src2),
    .head_seq(rvq_head_seq),
    .rd_addr(rvq_rd_addr), .rd_seq(rvq_rd_seq), .rd_value(rvq_rd_value),
    .rd_present(rvq_rd_present), .count(rvq_count)
  );
  assign trl_pred_lreg = rvq_head_lreg;

  trailing_checker u_chk (
    .clk, .rst,
    .res_valid(trl_res_valid), .res_lreg(trl_res_lreg), .res_value(trl_res_value),
    .res_ready(trl_res_ready),
    .rvq_empty, .rvq_lreg(rvq_head_lreg), .rvq_value(rvq_head_value), .rvq_pop,
    .error(trl_reg_error),
    .rd_lreg(trf_rd_lreg), .rd_value(trf_rd_value),
    .inj_valid, .inj_lreg, .inj_bit
  );

  lvq #(.DEPTH(LVQ_DEPTH)) u_lvq (
    .clk, .rst,
    .push(lvq_push), .push_value(lvq_value), .full(lvq_full),
    .pop(trl_load_pop), .empty(lvq_empty), .head_value(trl_load_value),
    .corrected_err(lvq_corrected), .uncorrectable_err(lvq_uncorrectable),
    .inj_flip(lvq_inj_flip)
  );
  assign trl_load_valid = !lvq_empty;

  boq #(.DEPTH(BOQ_DEPTH)) u_boq (
    .clk, .rst,
    .push(boq_push), .push_entry(boq_entry), .full(boq_full),
    .pop(trl_br_pop), .empty(boq_empty), .head_entry(trl_br_entry),
    .count(boq_count)
  );
  assign trl_br_valid = !boq_empty;

  store_buffer #(.DEPTH(STB_DEPTH)) u_stb (
    .clk, .rst,
    .ld_push(stb_push), .ld_store(stb_store), .full(stb_full),
    .trl_valid(trl_st_valid), .trl_store(trl_st), .trl_ready(trl_st_ready),
    .mem_we, .mem_addr, .mem_data, .error(trl_st_error), .count(stb_count)
  );

endmodule
