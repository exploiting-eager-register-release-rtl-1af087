// rmt_e2e_bench: the end-to-end driver of the register side, with the
// number of physical registers as a parameter. It holds the same models of
// the parts outside the design as the full-size end-to-end test (issue
// queue and functional units of the leader, front end with mispredicted
// branches and wrong-path fetch, in-order trailing pipeline with a
// reference register file), runs a random program of NPROG instructions
// through one instance of the top, checks every result, load, store and
// branch the trailer sees, and requires each mechanism to occur. It ends by
// raising done with its counts instead of finishing the simulation, so that
// a testbench can run several sizes side by side.
module rmt_e2e_bench
  import rmt_pkg::*;
#(
  parameter int NP    = 60,
  parameter int NPROG = 6000
) (
  output bit done,
  output int checks,
  output int failures,
  output int cycles,
  output int commits
);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
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

  eager_rmt_top #(.NUM_PREGS(NP)) dut (.*);

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
  int n_eager = 0, n_conv = 0, n_cb_rvq = 0, n_cb_trf = 0, n_squash = 0, n_stall_reg = 0,
      n_stall_q = 0, n_ecc = 0, n_store = 0, n_commit = 0, n_recov = 0, n_mis = 0;
  int walk_expect = -1, walk_seen = 0;

  task automatic drive_idle();
    ren_v = 0; iss_v = 0; wb_v = 0; wb_mispredict = 0; wb_has_dest = 0; wb_taken = 0;
    trl_res_valid = 0; trl_load_pop = 0; trl_br_pop = 0; trl_st_valid = 0;
    lvq_inj_flip = '0; inj_valid = 0;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; cycles = 0; commits = 0;
    foreach (prog[i]) prog[i] = rnd_instr(1);
    foreach (ref_rf[i]) ref_rf[i] = '0;
    drive_idle();
    ren_req = '0; iss_rob = 0; wb_rob = 0; wb_preg = 0; wb_value = 0; wb_aux = 0;
    trl_res_lreg = 0; trl_res_value = 0; trl_st = '0; inj_lreg = 0; inj_bit = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (tk < NPROG) begin
      automatic instr_t cur;
      automatic bit ren_try = 0, mis_now = 0;
      automatic int iss_i = -1, wb_i = -1, phase;
      automatic bit t_alu = 0, t_load = 0, t_store = 0, t_br = 0;
      automatic xlen_t v1 = 0, v2 = 0, tres = 0;
      automatic store_t tst;
      @(posedge clk);
      #1;
      cyc++;
      drive_idle();
      // ---- recovery walk length
      if (recovering) begin
        walk_seen += ev_squash;
      end else if (walk_expect >= 0) begin
        chk(walk_seen == walk_expect, $sformatf("recovery walked %0d entries, expected %0d",
                                                walk_seen, walk_expect));
        walk_expect = -1;
      end
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
      // ---- issue: oldest-first with random skipping
      if (!recovering) begin
        for (int i = 0; i < fl.size(); i++) begin
          if (!fl[i].issued && (!fl[i].in.use1 || preg_ready[fl[i].p1]) &&
              (!fl[i].in.use2 || preg_ready[fl[i].p2]) && $urandom_range(3) != 0) begin
            iss_i = i;
            break;
          end
        end
        if (iss_i >= 0) begin iss_v = 1; iss_rob = fl[iss_i].rob; end
        // ---- writeback: oldest finished
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
      phase = (cyc / 1500) % 4;
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
        if (t_load) begin
          trl_load_pop = 1;
          if ($urandom_range(4) == 0) lvq_inj_flip[$urandom_range(ECC_W - 1)] = 1'b1;
        end
        if (t_store) begin
          tst = '{addr: v1 + ti.imm, data: v2};
          trl_st_valid = 1; trl_st = tst;
        end
        if (t_br) trl_br_pop = 1;
      end
      #1;
      // ---- sample what happened this cycle
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
        // squash everything younger than the branch
        walk_expect = fl.size() - 1 - wb_i;
        walk_seen = 0;
        while (fl.size() > wb_i + 1) void'(fl.pop_back());
        wrongpath = 0;
        n_mis++;
      end
      if (t_alu || t_load) begin
        automatic instr_t ti = prog[tk];
        chk(trl_pred_lreg == ti.dest, "RVQ head names the expected register");
        chk(trl_pred_src1 == v1 && trl_pred_src2 == v2, "RVQ carries the source operands");
        chk(!trl_reg_error, $sformatf("register result of instruction %0d checks", tk));
        ref_rf[ti.dest] = tres;
      end
      if (t_load) begin
        chk(trl_load_value == tres && !lvq_uncorrectable, "LVQ delivers the load value");
        if (lvq_inj_flip != 0) begin chk(lvq_corrected, "ECC corrects LVQ bit flip"); n_ecc++; end
      end
      if (t_store) begin
        chk(mem_we && !trl_st_error && mem_addr == tst.addr && mem_data == tst.data,
            "store checked and written to memory");
        n_store += mem_we;
      end
      if (t_br) begin
        automatic instr_t ti = prog[tk];
        chk(trl_br_entry.taken == (v1[0] ^ v2[0]) && trl_br_entry.target == ti.imm,
            "BOQ delivers the branch outcome");
      end
      if (t_alu || t_load || t_store || t_br) tk++;
      chk(!trl_reg_error || (t_alu || t_load), "no check error outside checks");
      if (ev_commit) begin
        chk(fl.size() > 0 && fl[0].k >= 0 && fl[0].written, "commits only finished correct-path work");
        void'(fl.pop_front());
        n_commit++;
      end
      n_eager += ev_eager_release; n_conv += ev_conv_release;
      n_cb_rvq += ev_copyback_rvq; n_cb_trf += ev_copyback_trf;
      n_squash += ev_squash; n_stall_reg += ev_stall_noreg; n_stall_q += ev_stall_queue;
      if (recovering && !ev_squash) n_recov++;
    end
    $display("NUM_PREGS=%0d cycles=%0d commits=%0d mispredicts=%0d eager=%0d conventional=%0d copyback_rvq=%0d copyback_trf=%0d squashed=%0d stall_noreg=%0d stall_queue=%0d ecc_fixed=%0d stores=%0d",
             NP, cyc, n_commit, n_mis, n_eager, n_conv, n_cb_rvq, n_cb_trf, n_squash,
             n_stall_reg, n_stall_q, n_ecc, n_store);
    chk(n_commit == NPROG, "every program instruction committed");
    chk(n_eager > 0, "eager release happened");
    chk(n_conv > 0, "conventional release happened");
    chk(n_cb_rvq > 0, "copy-back from the RVQ happened");
    chk(n_cb_trf > 0, "copy-back from the trailer register file happened");
    chk(n_squash > 0 && n_mis > 0, "squash walks happened");
    chk(n_stall_reg > 0, "rename stalled for lack of registers");
    chk(n_stall_q > 0, "commit stalled on a full queue");
    chk(n_ecc > 0, "LVQ ECC corrected a bit flip");
    chk(n_store > 0, "checked stores reached memory");
    drive_idle();
    cycles = cyc; commits = n_commit;
    done = 1;
  end
endmodule
