// tb_leading_core: directed test of the leading core's eager release and
// recovery, with the RVQ and the trailer register file modelled here.
//
// Scenario A: a register P whose value has been committed into the RVQ is
// overwritten; it is released eagerly exactly one cycle after its last
// pending consumer issues, reallocated to a younger instruction, and a
// mispredicted branch between producer and overwriter squashes both; the
// walk takes two cycles, re-instates P from the RVQ and a later consumer
// reads the old value. Scenario B repeats this with the RVQ entry already
// consumed, so the value must come from the trailer register file (the
// RVQ model holds a wrong value there). Scenario C: producer and
// overwriter commit in consecutive cycles, which must free the old
// register conventionally instead of eagerly.
module tb_leading_core;
  import rmt_pkg::*;
  localparam int NP = NUM_PREGS_D;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic ren_v, ren_ready, iss_v, wb_v, wb_has_dest, wb_taken, wb_mispredict, recovering;
  rename_req_t ren_req;
  rob_idx_t ren_rob, iss_rob, wb_rob;
  preg_t ren_dest_preg, ren_src1_preg, ren_src2_preg, wb_preg;
  logic [NP-1:0] preg_ready;
  xlen_t iss_val1, iss_val2, wb_value, wb_aux;
  logic rvq_push, rvq_full, rvq_rd_present, lvq_push, lvq_full, boq_push, boq_full,
        stb_push, stb_full;
  lreg_t rvq_lreg, trf_rd_lreg;
  xlen_t rvq_value, rvq_src1, rvq_src2, rvq_rd_value, lvq_value, trf_rd_value;
  rvq_addr_t rvq_push_addr, rvq_rd_addr;
  seq_t rvq_push_seq, rvq_rd_seq;
  boq_entry_t boq_entry;
  store_t stb_store;
  logic ev_commit, ev_eager_release, ev_conv_release, ev_copyback_rvq, ev_copyback_trf,
        ev_squash, ev_stall_noreg, ev_stall_queue;
  logic [$clog2(NP+1)-1:0] free_count;

  leading_core dut (.*);

  // ---- RVQ and trailer register file models
  xlen_t rvqm [1024];
  xlen_t trfm [NUM_LREGS];
  bit present;
  int pushes = 0;
  assign rvq_full = 0; assign lvq_full = 0; assign boq_full = 0; assign stb_full = 0;
  assign rvq_push_addr = rvq_addr_t'(pushes);
  assign rvq_push_seq = seq_t'(pushes);
  assign rvq_rd_value = rvqm[rvq_rd_addr];
  assign rvq_rd_present = present;
  assign trf_rd_value = trfm[trf_rd_lreg];
  xlen_t last_push_value;
  lreg_t last_push_lreg;
  always @(posedge clk) if (!rst && rvq_push) begin
    rvqm[pushes] <= rvq_value;
    last_push_value <= rvq_value;
    last_push_lreg <= rvq_lreg;
    pushes <= pushes + 1;
  end

  int n_eager = 0, n_conv = 0, n_cbr = 0, n_cbt = 0, n_sq = 0, n_com = 0;
  always @(posedge clk) if (!rst) begin
    n_eager <= n_eager + ev_eager_release; n_conv <= n_conv + ev_conv_release;
    n_cbr <= n_cbr + ev_copyback_rvq; n_cbt <= n_cbt + ev_copyback_trf;
    n_sq <= n_sq + ev_squash; n_com <= n_com + ev_commit;
  end

  task automatic idle();
    ren_v = 0; iss_v = 0; wb_v = 0; wb_mispredict = 0; wb_has_dest = 0;
  endtask
  task automatic ren(input kind_e k, input bit hd, input int d, input bit u1, input int s1,
                     output rob_idx_t r, output preg_t dp, output preg_t p1);
    @(negedge clk); idle();
    ren_v = 1;
    ren_req = '{kind: k, has_dest: hd, dest: lreg_t'(d), use_src1: u1, src1: lreg_t'(s1),
                use_src2: 0, src2: '0};
    #1 chk(ren_ready, "rename accepted");
    r = ren_rob; dp = ren_dest_preg; p1 = ren_src1_preg;
    @(negedge clk); idle();
  endtask
  task automatic issue(input rob_idx_t r, output xlen_t v1);
    @(negedge clk); idle();
    iss_v = 1; iss_rob = r;
    #1 v1 = iss_val1;
    @(negedge clk); idle();
  endtask
  task automatic wb(input rob_idx_t r, input preg_t p, input bit hd, input xlen_t v, input bit mis);
    @(negedge clk); idle();
    wb_v = 1; wb_rob = r; wb_preg = p; wb_has_dest = hd; wb_value = v; wb_aux = 0;
    wb_taken = 0; wb_mispredict = mis;
    @(negedge clk); idle();
  endtask
  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    rob_idx_t r0, r1, r2, r3, r4;
    preg_t p0, p2, p3, p4, px, q1;
    xlen_t v;
    int e0, s0, c0, f0;
    foreach (trfm[i]) trfm[i] = '0;
    foreach (rvqm[i]) rvqm[i] = '0;
    present = 1;
    idle(); ren_req = '0; iss_rob = 0; wb_rob = 0; wb_preg = 0; wb_value = 0; wb_aux = 0; wb_taken = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // ------------------------------------------------ scenario A
    ren(K_ALU, 1, 1, 1, 2, r0, p0, px);
    chk(p0 == preg_t'(NUM_LREGS), "first destination is the lowest free register");
    issue(r0, v); chk(v == 0, "initial architectural value is zero");
    wb(r0, p0, 1, 64'h1111, 0);
    wait_cycles(2);
    chk(n_com == 1 && last_push_value == 64'h1111 && last_push_lreg == 1, "commit copies value into the RVQ");
    ren(K_BRANCH, 0, 0, 1, 1, r1, px, q1);
    chk(q1 == p0, "branch reads the producer's register");
    ren(K_ALU, 1, 1, 1, 3, r2, p2, px);
    wait_cycles(3);
    chk(n_eager == 0, "no eager release while a consumer is pending");
    e0 = n_eager; f0 = free_count;
    @(negedge clk); idle(); iss_v = 1; iss_rob = r1;
    @(posedge clk); #1 chk(ev_eager_release, "eager release one cycle after the last consumer issued");
    @(negedge clk); idle();
    @(negedge clk);
    chk(n_eager == e0 + 1 && free_count == f0 + 1, "register returned to the pool");
    ren(K_ALU, 1, 5, 0, 0, r3, p3, px);
    chk(p3 == p0, "eagerly released register reallocated");
    issue(r3, v);
    wb(r3, p3, 1, 64'h2222, 0);
    s0 = n_sq; c0 = n_cbr;
    wb(r1, 0, 0, 0, 1);
    chk(recovering, "mispredict starts recovery");
    wait_cycles(4);
    chk(!recovering && n_sq == s0 + 2, "walk squashed the two younger instructions");
    chk(n_cbr == c0 + 1 && n_cbt == 0, "value re-instated from the RVQ");
    ren(K_ALU, 1, 6, 1, 1, r4, p4, q1);
    chk(q1 == p0, "rename table maps r1 to the re-instated register again");
    issue(r4, v);
    chk(v == 64'h1111, "consumer reads the re-instated value");
    wb(r4, p4, 1, v + 1, 0);
    wait_cycles(3);
    chk(n_com == 3, "branch and consumer committed");
    // ------------------------------------------------ scenario B
    begin
      rob_idx_t b0, b1, b2, b3;
      preg_t bp0, bp2, bp3, bx, bq;
      int a0;
      ren(K_ALU, 1, 8, 0, 0, b0, bp0, bx);
      issue(b0, v);
      wb(b0, bp0, 1, 64'h3333, 0);
      wait_cycles(2);
      a0 = pushes - 1;
      ren(K_BRANCH, 0, 0, 1, 8, b1, bx, bq);
      ren(K_ALU, 1, 8, 0, 0, b2, bp2, bx);
      issue(b1, v);
      wait_cycles(2);
      chk(n_eager == e0 + 2, "second eager release");
      // the trailer has consumed the entry: value only in its register file
      present = 0;
      trfm[8] = 64'h3333;
      rvqm[a0] = 64'hDEAD;
      wb(b1, 0, 0, 0, 1);
      wait_cycles(3);
      chk(n_cbt == 1 && !recovering, "value re-instated from the trailer register file");
      ren(K_ALU, 1, 9, 1, 8, b3, bp3, bq);
      chk(bq == bp0, "r8 maps to its old register");
      issue(b3, v);
      chk(v == 64'h3333, "consumer reads the trailer's checked value");
      wb(b3, bp3, 1, 0, 0);
      present = 1;
      wait_cycles(3);
    end
    // ------------------------------------------------ scenario C
    begin
      rob_idx_t c0r, c1r;
      preg_t cp0, cp1, cx;
      int ne, nc;
      ren(K_ALU, 1, 4, 0, 0, c0r, cp0, cx);
      ren(K_ALU, 1, 4, 0, 0, c1r, cp1, cx);
      issue(c1r, v);
      wb(c1r, cp1, 1, 64'h55, 0);
      issue(c0r, v);
      ne = n_eager; nc = n_conv;
      // c0r frees the initial mapping of r4, c1r then frees cp0
      wb(c0r, cp0, 1, 64'h44, 0);
      wait_cycles(4);
      chk(n_conv == nc + 2 && n_eager == ne, "back-to-back commits free the old register conventionally");
      chk(free_count == (NP - NUM_LREGS), "no register lost or duplicated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
