// tb_fault_injection: soft-error study on the trailer register file, at the
// default sizes.
//
// Eager release relies on the trailer register file holding a correct copy
// of a released value once the RVQ entry is gone; that file has no ECC, so
// a bit flip there can be adopted by the leader during recovery and then go
// unnoticed, because both threads continue with the same wrong value. This
// testbench measures how often that happens. Each run resets the design,
// executes a fresh random program with the same leader/trailer models as
// the end-to-end test, and flips one random bit of one random trailer
// register through the injection port after about a thousand cycles (the
// model of the trailing pipeline applies the same flip to its copy, since
// both are the same physical register file). The run ends at the first of:
//   masked     - the trailer overwrites the register with a checked value;
//   detected   - a check disagrees: a source operand from the RVQ differs
//                from the trailer's register, a result differs, a store
//                differs, or a branch outcome differs from the BOQ;
//   undetected - the leader copies the corrupted register back during a
//                recovery walk (the coverage loss of eager release).
// Runs that reach the end of the program with none of these are latent.
// Before the flip every check must pass. Masked and detected outcomes must
// each occur; the undetected share is reported, not required.
module tb_fault_injection;
  import rmt_pkg::*;
  localparam int NPROG = 3000;
  localparam int NRUNS = 250;
  localparam int NP = NUM_PREGS_D;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- DUT
  logic ren_v, ren_ready, iss_v, wb_v, wb_has_dest, wb_taken, wb_mispredict, recovering;
  rename_req_t ren_req;
  rob_idx_t ren_rob, iss_rob, wb_rob;
  preg_t ren_dest_preg, ren_src1_preg, ren_src2_preg, wb_preg;
  logic [NP-1:0] preg_ready;
  xlen_t iss_val1, iss_val2, wb_value, wb_aux;
  logic trl_res_valid, trl_res_ready, trl_reg_error;
  lreg_t trl_res_lreg, trl_pred_lreg;
  xlen_t trl_res_value, trl_pred_src1, trl_pred_src2;
  logic trl_load_pop, trl_load_valid, lvq_corrected, lvq_uncorrectable;
  xlen_t trl_load_value;
  logic [ECC_W-1:0] lvq_inj_flip;
  logic trl_br_pop, trl_br_valid;
  boq_entry_t trl_br_entry;
  logic trl_st_valid, trl_st_ready, trl_st_error, mem_we;
  store_t trl_st;
  xlen_t mem_addr, mem_data;
  logic inj_valid;
  lreg_t inj_lreg;
  logic [5:0] inj_bit;
  logic ev_commit, ev_eager_release, ev_conv_release, ev_copyback_rvq, ev_copyback_trf,
        ev_squash, ev_stall_noreg, ev_stall_queue;
  logic [$clog2(NP+1)-1:0] free_count;
  logic [$clog2(RVQ_DEPTH_D+1)-1:0] rvq_count;

  eager_rmt_top dut (.*);

  // ---------------------------------------------------------------- program
  typedef struct {
    kind_e kind;
    lreg_t dest, s1, s2;
    bit    use1, use2;
    xlen_t imm;
    bit    mis;
    int    lat;
  } instr_t;

  instr_t prog [NPROG];

  function automatic instr_t rnd_instr(input bit allow_branch);
    instr_t i;
    int r = $urandom_range(99);
    i.kind = (r < 55) ? K_ALU : (r < 75) ? K_LOAD : (r < 86 || !allow_branch) ? K_STORE : K_BRANCH;
    if (!allow_branch && i.kind == K_STORE) i.kind = K_ALU;
    i.dest = lreg_t'($urandom_range(20));
    i.s1   = lreg_t'($urandom_range(20));
    i.s2   = lreg_t'($urandom_range(20));
    i.use1 = (i.kind != K_ALU) || ($urandom_range(7) != 0);
    i.use2 = (i.kind == K_STORE) || (i.kind == K_BRANCH) || (i.kind == K_ALU && $urandom_range(3) != 0);
    i.imm  = {$urandom, $urandom};
    i.mis  = (i.kind == K_BRANCH) && ($urandom_range(3) == 0);
    i.lat  = (i.kind == K_LOAD) ? (($urandom_range(9) == 0) ? $urandom_range(20, 60) : $urandom_range(1, 3))
           : (i.kind == K_BRANCH) ? $urandom_range(1, 8) : $urandom_range(1, 2);
    return i;
  endfunction

  function automatic xlen_t load_value(input xlen_t addr, input xlen_t imm);
    return (addr * 64'h9E3779B97F4A7C15) ^ imm;
  endfunction
  function automatic xlen_t alu(input xlen_t a, input xlen_t b, input xlen_t imm);
    return (a + b) ^ imm;
  endfunction

  // ---------------------------------------------------------------- leader side state
  typedef struct {
    int       k;          // program index, -1 on the wrong path
    instr_t   in;
    rob_idx_t rob;
    preg_t    dp, p1, p2;
    bit       issued, written;
    int       done_at;
    xlen_t    result, aux;
    bit       taken;
  } fl_t;
  fl_t fl [$];
  int pc = 0;
  bit wrongpath = 0;
  int cyc = 0;

  // ---------------------------------------------------------------- trailer side state
  xlen_t ref_rf [NUM_LREGS];
  int tk = 0;

  // ---------------------------------------------------------------- counters

  task automatic drive_idle();
    ren_v = 0; iss_v = 0; wb_v = 0; wb_mispredict = 0; wb_has_dest = 0; wb_taken = 0;
    trl_res_valid = 0; trl_load_pop = 0; trl_br_pop = 0; trl_st_valid = 0;
    lvq_inj_flip = '0; inj_valid = 0;
  endtask

  int n_run = 0, n_masked = 0, n_detected = 0, n_undetected = 0, n_latent = 0, total_cyc = 0;

  initial begin
    lreg_t fl_lreg;
    int    fl_bit, inj_at, ph_off;
    bit    flipped, outcome;
    drive_idle();
    ren_req = '0; iss_rob = 0; wb_rob = 0; wb_preg = 0; wb_value = 0; wb_aux = 0;
    trl_res_lreg = 0; trl_res_value = 0; trl_st = '0; inj_lreg = 0; inj_bit = 0;
    for (int run = 0; run < NRUNS; run++) begin
      // ---- fresh program and reset
      rst = 1;
      drive_idle();
      foreach (prog[i]) prog[i] = rnd_instr(1);
      foreach (ref_rf[i]) ref_rf[i] = '0;
      fl.delete();
      pc = 0; tk = 0; wrongpath = 0; cyc = 0;
      inj_at = $urandom_range(800, 1200);
      ph_off = $urandom_range(1999);
      flipped = 0; outcome = 0; fl_lreg = 0; fl_bit = 0;
      repeat (3) @(posedge clk);
      rst = 0;
      while (tk < NPROG && !outcome) begin
        automatic instr_t cur;
        automatic bit ren_try = 0, mis_now = 0, mismatch = 0;
        automatic int iss_i = -1, wb_i = -1, phase;
        automatic bit t_alu = 0, t_load = 0, t_store = 0, t_br = 0, inj_now = 0;
        automatic xlen_t v1 = 0, v2 = 0, tres = 0;
        automatic store_t tst;
        @(posedge clk);
        #1;
        cyc++; total_cyc++;
        drive_idle();
        // ---- rename
        if (!recovering && (wrongpath || pc < NPROG) && $urandom_range(7) != 0) begin
          cur = wrongpath ? rnd_instr(0) : prog[pc];
          ren_v = 1;
          ren_req.kind = cur.kind;
          ren_req.has_dest = (cur.kind == K_ALU || cur.kind == K_LOAD);
          ren_req.dest = cur.dest;
          ren_req.use_src1 = cur.use1; ren_req.src1 = cur.s1;
          ren_req.use_src2 = cur.use2; ren_req.src2 = cur.s2;
          ren_try = 1;
        end
        // ---- issue and writeback, as in the end-to-end test
        if (!recovering) begin
          for (int i = 0; i < fl.size(); i++) begin
            if (!fl[i].issued && (!fl[i].in.use1 || preg_ready[fl[i].p1]) &&
                (!fl[i].in.use2 || preg_ready[fl[i].p2]) && $urandom_range(3) != 0) begin
              iss_i = i;
              break;
            end
          end
          if (iss_i >= 0) begin iss_v = 1; iss_rob = fl[iss_i].rob; end
          for (int i = 0; i < fl.size(); i++)
            if (fl[i].issued && !fl[i].written && fl[i].done_at <= cyc) begin wb_i = i; break; end
          if (wb_i >= 0) begin
            wb_v = 1; wb_rob = fl[wb_i].rob; wb_preg = fl[wb_i].dp;
            wb_has_dest = (fl[wb_i].in.kind == K_ALU || fl[wb_i].in.kind == K_LOAD);
            wb_value = fl[wb_i].result; wb_aux = fl[wb_i].aux; wb_taken = fl[wb_i].taken;
            wb_mispredict = (fl[wb_i].k >= 0) && fl[wb_i].in.mis;
            mis_now = wb_mispredict;
          end
        end
        // ---- trailer
        phase = ((cyc + ph_off) / 500) % 4;
        if (phase == 0 || (phase == 1 && $urandom_range(1) == 0) ||
            (phase == 3 && $urandom_range(3) == 0)) begin
          automatic instr_t ti = prog[tk];
          v1 = ti.use1 ? ref_rf[ti.s1] : '0;
          v2 = ti.use2 ? ref_rf[ti.s2] : '0;
          case (ti.kind)
            K_ALU:    if (trl_res_ready) begin t_alu = 1; tres = alu(v1, v2, ti.imm); end
            K_LOAD:   if (trl_res_ready && trl_load_valid) begin
                        t_load = 1; tres = load_value(v1 + ti.imm, ti.imm);
                      end
            K_STORE:  if (trl_st_ready) t_store = 1;
            default:  if (trl_br_valid) t_br = 1;
          endcase
          if (t_alu || t_load) begin
            trl_res_valid = 1; trl_res_lreg = ti.dest; trl_res_value = tres;
          end
          if (t_load) trl_load_pop = 1;
          if (t_store) begin
            tst = '{addr: v1 + ti.imm, data: v2};
            trl_st_valid = 1; trl_st = tst;
          end
          if (t_br) trl_br_pop = 1;
        end
        // ---- the soft error, in a cycle where the trailer writes no register
        if (!flipped && cyc >= inj_at && !t_alu && !t_load) begin
          fl_lreg = lreg_t'($urandom_range(20));
          fl_bit = $urandom_range(XLEN - 1);
          inj_valid = 1; inj_lreg = fl_lreg; inj_bit = 6'(fl_bit);
          inj_now = 1;
        end
        #1;
        // ---- leader bookkeeping
        if (ren_try && ren_ready) begin
          automatic fl_t e;
          e.k = wrongpath ? -1 : pc; e.in = cur; e.rob = ren_rob; e.dp = ren_dest_preg;
          e.p1 = ren_src1_preg; e.p2 = ren_src2_preg; e.issued = 0; e.written = 0;
          e.done_at = 0; e.result = 0; e.aux = 0; e.taken = 0;
          fl.push_back(e);
          if (!wrongpath) begin
            pc++;
            if (cur.kind == K_BRANCH && cur.mis) wrongpath = 1;
          end
        end
        if (iss_i >= 0) begin
          automatic instr_t in = fl[iss_i].in;
          fl[iss_i].issued = 1;
          fl[iss_i].done_at = cyc + in.lat;
          case (in.kind)
            K_ALU:    fl[iss_i].result = alu(iss_val1, iss_val2, in.imm);
            K_LOAD:   fl[iss_i].result = load_value(iss_val1 + in.imm, in.imm);
            K_STORE:  fl[iss_i].aux = iss_val1 + in.imm;
            default:  begin fl[iss_i].taken = iss_val1[0] ^ iss_val2[0]; fl[iss_i].aux = in.imm; end
          endcase
        end
        if (wb_i >= 0) fl[wb_i].written = 1;
        if (mis_now) begin
          while (fl.size() > wb_i + 1) void'(fl.pop_back());
          wrongpath = 0;
        end
        if (ev_commit) void'(fl.pop_front());
        // ---- what the checks saw this cycle
        if (t_alu || t_load)
          mismatch = (trl_pred_src1 != v1) || (trl_pred_src2 != v2) || trl_reg_error;
        if (t_store) mismatch |= trl_st_error || !mem_we;
        if (t_br) mismatch |= (trl_br_entry.taken != (v1[0] ^ v2[0]));
        if (!flipped) begin
          chk(!mismatch, $sformatf("run %0d: checks agree before the flip", run));
        end else if (ev_copyback_trf && dut.trf_rd_lreg == fl_lreg) begin
          n_undetected++; outcome = 1;
        end else if (mismatch) begin
          n_detected++; outcome = 1;
        end else if ((t_alu || t_load) && prog[tk].dest == fl_lreg) begin
          n_masked++; outcome = 1;
        end
        if (t_alu || t_load) ref_rf[prog[tk].dest] = tres;
        if (t_alu || t_load || t_store || t_br) tk++;
        if (inj_now) begin
          ref_rf[fl_lreg][fl_bit] = ~ref_rf[fl_lreg][fl_bit];
          flipped = 1;
        end
      end
      if (!outcome) n_latent++;
      n_run++;
    end
    $display("runs=%0d cycles=%0d masked=%0d detected=%0d undetected=%0d latent=%0d undetected_share=%0.2f%%",
             n_run, total_cyc, n_masked, n_detected, n_undetected, n_latent,
             100.0 * n_undetected / n_run);
    chk(n_run == NRUNS, "all runs completed");
    chk(n_masked > 0, "some flips were masked by a later write");
    chk(n_detected > 0, "some flips were detected by a check");
    chk(n_masked + n_detected + n_undetected + n_latent == n_run, "every run classified once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUNS * 8000) @(posedge clk);
    failures++;
    $display("watchdog expired in run %0d", n_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
