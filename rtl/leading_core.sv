// leading_core: register management of the leading thread with eager
// register release.
//
// The core renames one instruction per cycle (rename table, free list,
// ROB, usage table), lets the external issue logic read operands from the
// physical register file, accepts results, and commits one instruction per
// cycle in order. A committing instruction that writes a register copies
// its value into the RVQ together with its source operands; loads also
// push the LVQ, stores the store buffer and branches the BOQ. Commit waits
// while the queue it needs is full.
//
// Eager release: a physical register P is returned to the free list as
// soon as (1) no dispatched consumer is still waiting to read it, (2) its
// producer A has committed and its value is in the RVQ, and (3) an
// instruction B that overwrites the same logical register has been
// renamed. The usage table finds such registers every cycle; one is
// released per cycle and B's ROB entry records the release (de-allocate
// bit, A's inum and RVQ address). When B commits, P is not freed again.
//
// Recovery: a mispredicted branch (wb_mispredict) starts a walk that
// removes the youngest ROB entry each cycle until the branch is the
// youngest. Each removed entry restores the old mapping in the rename
// table and frees its destination; an unissued entry also returns its
// consumer counts. An entry whose de-allocate bit is set takes P back
// from the free list and copies A's value into it: from the RVQ if the
// trailer has not consumed that entry yet, otherwise from the trailer's
// register file. Rename, issue, writeback, commit and eager release pause
// while recovering is high. The one-wide pipeline, the walk-back recovery
// and the one-release-per-cycle limit are this design's choices.
module leading_core
  import rmt_pkg::*;
#(
  parameter int unsigned NUM_PREGS = NUM_PREGS_D,
  parameter int unsigned ROB_SIZE  = ROB_SIZE_D
) (
  input  logic        clk,
  input  logic        rst,
  // rename / dispatch
  input  logic        ren_v,
  input  rename_req_t ren_req,
  output logic        ren_ready,
  output rob_idx_t    ren_rob,
  output preg_t       ren_dest_preg,
  output preg_t       ren_src1_preg,
  output preg_t       ren_src2_preg,
  output logic [NUM_PREGS-1:0] preg_ready,
  // issue
  input  logic        iss_v,
  input  rob_idx_t    iss_rob,
  output xlen_t       iss_val1,
  output xlen_t       iss_val2,
  // writeback
  input  logic        wb_v,
  input  rob_idx_t    wb_rob,
  input  preg_t       wb_preg,
  input  logic        wb_has_dest,
  input  xlen_t       wb_value,
  input  xlen_t       wb_aux,
  input  logic        wb_taken,
  input  logic        wb_mispredict,
  output logic        recovering,
  // RVQ
  output logic        rvq_push,
  output lreg_t       rvq_lreg,
  output xlen_t       rvq_value,
  output xlen_t       rvq_src1,
  output xlen_t       rvq_src2,
  input  rvq_addr_t   rvq_push_addr,
  input  seq_t        rvq_push_seq,
  input  logic        rvq_full,
  output rvq_addr_t   rvq_rd_addr,
  output seq_t        rvq_rd_seq,
  input  xlen_t       rvq_rd_value,
  input  logic        rvq_rd_present,
  // LVQ, BOQ, store buffer
  output logic        lvq_push,
  output xlen_t       lvq_value,
  input  logic        lvq_full,
  output logic        boq_push,
  output boq_entry_t  boq_entry,
  input  logic        boq_full,
  output logic        stb_push,
  output store_t      stb_store,
  input  logic        stb_full,
  // trailer register file read (copy-back)
  output lreg_t       trf_rd_lreg,
  input  xlen_t       trf_rd_value,
  // event strobes
  output logic        ev_commit,
  output logic        ev_eager_release,
  output logic        ev_conv_release,
  output logic        ev_copyback_rvq,
  output logic        ev_copyback_trf,
  output logic        ev_squash,
  output logic        ev_stall_noreg,
  output logic        ev_stall_queue,
  output logic [$clog2(NUM_PREGS+1)-1:0] free_count
);
  // ------------------------------------------------------------ wiring
  logic [NUM_PREGS-1:0] free_vec;
  logic       alloc_ok;
  preg_t      alloc_preg, dest_old_preg;
  logic       rob_full, rob_empty;
  rob_idx_t   rob_tail, head_idx, last_idx;
  rob_entry_t head_e, last_e, iss_e;
  logic [$clog2(ROB_SIZE+1)-1:0] rob_count;

  logic       er_valid;
  preg_t      er_preg;
  rob_idx_t   er_owr_rob;
  seq_t       er_inum;
  rvq_addr_t  er_addr;

  // ------------------------------------------------------------ recovery state
  logic       rec_q;
  rob_idx_t   br_idx_q;
  assign recovering = rec_q;

  wire walk_done = (last_idx == br_idx_q);
  wire walk      = rec_q && !walk_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      rec_q    <= 1'b0;
      br_idx_q <= '0;
    end else if (!rec_q) begin
      if (wb_v && wb_mispredict) begin
        rec_q    <= 1'b1;
        br_idx_q <= wb_rob;
      end
    end else if (walk_done) begin
      rec_q <= 1'b0;
    end
  end

  // ------------------------------------------------------------ rename
  wire need_reg  = ren_req.has_dest;
  assign ren_ready = !rec_q && !rob_full && (!need_reg || alloc_ok);
  wire ren_fire  = ren_v && ren_ready;
  assign ev_stall_noreg = ren_v && !rec_q && !rob_full && need_reg && !alloc_ok;
  assign ren_rob       = rob_tail;
  assign ren_dest_preg = alloc_preg;

  rob_entry_t new_e;
  always_comb begin
    new_e           = '0;
    new_e.kind      = ren_req.kind;
    new_e.has_dest  = ren_req.has_dest;
    new_e.lreg      = ren_req.dest;
    new_e.new_preg  = alloc_preg;
    new_e.old_preg  = dest_old_preg;
    new_e.use_src1  = ren_req.use_src1;
    new_e.src1_preg = ren_src1_preg;
    new_e.use_src2  = ren_req.use_src2;
    new_e.src2_preg = ren_src2_preg;
  end

  // ------------------------------------------------------------ commit
  logic queue_ok;
  always_comb begin
    queue_ok = 1'b1;
    if (head_e.has_dest && rvq_full) queue_ok = 1'b0;
    unique case (head_e.kind)
      K_LOAD:   if (lvq_full) queue_ok = 1'b0;
      K_STORE:  if (stb_full) queue_ok = 1'b0;
      K_BRANCH: if (boq_full) queue_ok = 1'b0;
      default:  ;
    endcase
  end
  wire   head_ready = !rob_empty && head_e.complete && !rec_q;
  wire   com_fire   = head_ready && queue_ok;
  assign ev_commit      = com_fire;
  assign ev_stall_queue = head_ready && !queue_ok;

  xlen_t prf_rd [3];
  preg_t prf_ra [3];
  logic  prf_we [2];
  preg_t prf_wa [2];
  xlen_t prf_wd [2];

  assign prf_ra[0] = iss_e.src1_preg;
  assign prf_ra[1] = iss_e.src2_preg;
  assign prf_ra[2] = head_e.new_preg;
  assign iss_val1  = iss_e.use_src1 ? prf_rd[0] : '0;
  assign iss_val2  = iss_e.use_src2 ? prf_rd[1] : '0;

  assign rvq_push  = com_fire && head_e.has_dest;
  assign rvq_lreg  = head_e.lreg;
  assign rvq_value = prf_rd[2];
  assign rvq_src1  = head_e.src1_val;
  assign rvq_src2  = head_e.src2_val;
  assign lvq_push  = com_fire && head_e.kind == K_LOAD;
  assign lvq_value = prf_rd[2];
  assign boq_push  = com_fire && head_e.kind == K_BRANCH;
  assign boq_entry = '{taken: head_e.taken, target: head_e.aux};
  assign stb_push  = com_fire && head_e.kind == K_STORE;
  assign stb_store = '{addr: head_e.aux, data: head_e.src2_val};

  wire conv_rel = com_fire && head_e.has_dest && !head_e.dealloc;
  assign ev_conv_release = conv_rel;

  // ------------------------------------------------------------ eager release
  wire er_fire = er_valid && !rec_q;
  assign ev_eager_release = er_fire;

  // ------------------------------------------------------------ recovery walk
  wire   sq_dest   = walk && last_e.has_dest;
  wire   sq_reinst = sq_dest && last_e.dealloc;
  assign rvq_rd_addr  = last_e.rvq_addr;
  assign rvq_rd_seq   = last_e.inum;
  assign trf_rd_lreg  = last_e.lreg;
  wire   xlen_t copy_value = rvq_rd_present ? rvq_rd_value : trf_rd_value;
  assign ev_squash       = walk;
  assign ev_copyback_rvq = sq_reinst && rvq_rd_present;
  assign ev_copyback_trf = sq_reinst && !rvq_rd_present;

  assign prf_we[0] = wb_v && wb_has_dest;
  assign prf_wa[0] = wb_preg;
  assign prf_wd[0] = wb_value;
  assign prf_we[1] = sq_reinst;
  assign prf_wa[1] = last_e.old_preg;
  assign prf_wd[1] = copy_value;

  // consumers leave the issue queue at issue, or when squashed unissued
  wire sq_unissued = walk && !last_e.issued;
  wire dec1_v = (iss_v && iss_e.use_src1) || (sq_unissued && last_e.use_src1);
  wire dec2_v = (iss_v && iss_e.use_src2) || (sq_unissued && last_e.use_src2);
  preg_t dec1_p, dec2_p;
  assign dec1_p = walk ? last_e.src1_preg : iss_e.src1_preg;
  assign dec2_p = walk ? last_e.src2_preg : iss_e.src2_preg;

  // ------------------------------------------------------------ instances
  rename_table #(.NUM_PREGS(NUM_PREGS)) u_rat (
    .clk, .rst,
    .src1(ren_req.src1), .src2(ren_req.src2), .dest(ren_req.dest),
    .src1_preg(ren_src1_preg), .src2_preg(ren_src2_preg),
    .dest_old_preg,
    .we(ren_fire && need_reg), .we_preg(alloc_preg),
    .rst_we(sq_dest), .rst_lreg(last_e.lreg), .rst_preg(last_e.old_preg)
  );

  free_list #(.NUM_PREGS(NUM_PREGS)) u_fl (
    .clk, .rst,
    .alloc(ren_fire && need_reg), .alloc_ok, .alloc_preg,
    .rel_commit(conv_rel), .rel_commit_preg(head_e.old_preg),
    .rel_eager(er_fire), .rel_eager_preg(er_preg),
    .rel_squash(sq_dest), .rel_squash_preg(last_e.new_preg),
    .reclaim(sq_reinst), .reclaim_preg(last_e.old_preg),
    .free_vec, .free_count
  );

  logic [$clog2(2*ROB_SIZE+1)-1:0] pending [NUM_PREGS];

  usage_table #(.NUM_PREGS(NUM_PREGS), .ROB_SIZE(ROB_SIZE)) u_ut (
    .clk, .rst, .free_vec,
    .alloc_v(ren_fire && need_reg), .alloc_preg, .alloc_rob(rob_tail),
    .ow_v(ren_fire && need_reg), .ow_preg(dest_old_preg), .ow_rob(rob_tail),
    .inc1_v(ren_fire && ren_req.use_src1), .inc1_preg(ren_src1_preg),
    .inc2_v(ren_fire && ren_req.use_src2), .inc2_preg(ren_src2_preg),
    .dec1_v, .dec1_preg(dec1_p), .dec2_v, .dec2_preg(dec2_p),
    .wb_v(wb_v && wb_has_dest), .wb_preg,
    .cm_v(rvq_push), .cm_preg(head_e.new_preg),
    .cm_addr(rvq_push_addr), .cm_inum(rvq_push_seq),
    .owc_v(sq_dest && !last_e.dealloc), .owc_preg(last_e.old_preg),
    .ri_v(sq_reinst), .ri_preg(last_e.old_preg),
    .ri_addr(last_e.rvq_addr), .ri_inum(last_e.inum), .ri_owner(last_idx),
    .block_v(com_fire), .block_rob(head_idx),
    .er_valid, .er_preg, .er_owr_rob, .er_inum, .er_addr,
    .ready_vec(preg_ready), .pending
  );

  rob #(.ROB_SIZE(ROB_SIZE)) u_rob (
    .clk, .rst,
    .alloc_v(ren_fire), .alloc_entry(new_e), .alloc_idx(rob_tail), .full(rob_full),
    .iss_v, .iss_idx(iss_rob), .iss_val1, .iss_val2, .iss_entry(iss_e),
    .wb_v, .wb_idx(wb_rob), .wb_aux, .wb_taken,
    .mk_v(er_fire), .mk_idx(er_owr_rob), .mk_inum(er_inum), .mk_addr(er_addr),
    .empty(rob_empty), .head_idx, .head_entry(head_e), .commit(com_fire),
    .last_idx, .last_entry(last_e), .squash_step(walk), .count(rob_count)
  );

  phys_regfile #(.NUM_PREGS(NUM_PREGS), .NR(3), .NW(2)) u_prf (
    .clk, .rst,
    .raddr(prf_ra), .rdata(prf_rd),
    .we(prf_we), .waddr(prf_wa), .wdata(prf_wd)
  );

  // The pipeline pauses while a squash is being walked back.
  a_quiet_in_recovery: assert property (@(posedge clk) disable iff (rst)
                                        rec_q |-> !iss_v && !wb_v);
  a_issue_once: assert property (@(posedge clk) disable iff (rst)
                                 iss_v |-> !iss_e.issued);
endmodule
