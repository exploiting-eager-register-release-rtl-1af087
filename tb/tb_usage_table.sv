// tb_usage_table: self-checking test of the usage table against a model
// of its fields. Random allocations, overwrites, consumer arrivals and
// departures, writebacks, commits into the RVQ, overwrite clears and
// re-instatements are applied; every cycle the eager-release candidate
// (lowest register that is allocated, in the RVQ, overwritten and without
// pending consumers, and not blocked) and the ready bits are compared.
module tb_usage_table;
  import rmt_pkg::*;
  localparam int N = NUM_PREGS_D;
  localparam int CW = $clog2(2*ROB_SIZE_D+1);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cand_seen = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-1:0] free_vec, ready_vec;
  logic alloc_v, ow_v, inc1_v, inc2_v, dec1_v, dec2_v, wb_v, cm_v, owc_v, ri_v, block_v, er_valid;
  preg_t alloc_preg, ow_preg, inc1_preg, inc2_preg, dec1_preg, dec2_preg, wb_preg, cm_preg,
         owc_preg, ri_preg, er_preg;
  rob_idx_t alloc_rob, ow_rob, ri_owner, block_rob, er_owr_rob;
  rvq_addr_t cm_addr, ri_addr, er_addr;
  seq_t cm_inum, ri_inum, er_inum;
  logic [CW-1:0] pending [N];
  usage_table dut (.*);

  bit m_ow [N], m_rvq [N], m_rdy [N];
  int m_pend [N];
  rvq_addr_t m_addr [N];
  seq_t m_inum [N];
  rob_idx_t m_owr [N];

  task automatic idle();
    alloc_v = 0; ow_v = 0; inc1_v = 0; inc2_v = 0; dec1_v = 0; dec2_v = 0; wb_v = 0;
    cm_v = 0; owc_v = 0; ri_v = 0; block_v = 0;
  endtask

  initial begin
    idle();
    alloc_preg = 0; ow_preg = 0; inc1_preg = 0; inc2_preg = 0; dec1_preg = 0; dec2_preg = 0;
    wb_preg = 0; cm_preg = 0; owc_preg = 0; ri_preg = 0; alloc_rob = 0; ow_rob = 0;
    ri_owner = 0; block_rob = 0; cm_addr = 0; ri_addr = 0; cm_inum = 0; ri_inum = 0;
    for (int i = 0; i < N; i++) begin
      free_vec[i] = 1'b0;
      m_ow[i] = 0; m_rvq[i] = 0; m_rdy[i] = 1; m_pend[i] = 0; m_addr[i] = 0; m_inum[i] = 0;
      m_owr[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int c = 0; c < 6000; c++) begin
      int exp_p;
      idle();
      // pick one register per operation, all different
      begin
        int p[8];
        for (int k = 0; k < 8; k++) p[k] = (c * 7 + k * 6 + $urandom_range(5)) % N;
        alloc_v = ($urandom_range(5) == 0); alloc_preg = preg_t'(p[0]);
        alloc_rob = rob_idx_t'($urandom);
        ow_v = ($urandom_range(3) == 0) && !m_ow[p[1]]; ow_preg = preg_t'(p[1]);
        ow_rob = rob_idx_t'($urandom);
        inc1_v = ($urandom_range(2) == 0); inc1_preg = preg_t'(p[2]);
        dec1_v = ($urandom_range(1) == 0) && m_pend[p[3]] > 0; dec1_preg = preg_t'(p[3]);
        wb_v = 1'($urandom); wb_preg = preg_t'(p[4]);
        cm_v = ($urandom_range(2) == 0); cm_preg = preg_t'(p[5]);
        cm_addr = rvq_addr_t'($urandom); cm_inum = $urandom;
        owc_v = ($urandom_range(7) == 0); owc_preg = preg_t'(p[6]);
        ri_v = ($urandom_range(15) == 0); ri_preg = preg_t'(p[7]);
        ri_addr = rvq_addr_t'($urandom); ri_inum = $urandom; ri_owner = rob_idx_t'($urandom);
        // keep the ports on distinct registers
        for (int k = 1; k < 8; k++) for (int j = 0; j < k; j++) if (p[k] == p[j]) begin
          case (k) 1: ow_v = 0; 2: inc1_v = 0; 3: dec1_v = 0; 4: wb_v = 0;
                   5: cm_v = 0; 6: owc_v = 0; 7: ri_v = 0; default: ; endcase
        end
        block_v = 1'($urandom); block_rob = rob_idx_t'($urandom_range(3));
        for (int i = 0; i < N; i++) if ($urandom_range(40) == 0) free_vec[i] = ~free_vec[i];
      end
      #1;
      exp_p = -1;
      for (int i = N - 1; i >= 0; i--)
        if (!free_vec[i] && m_rvq[i] && m_ow[i] && m_pend[i] == 0 &&
            !(block_v && m_owr[i] == block_rob)) exp_p = i;
      chk(er_valid == (exp_p >= 0), "candidate present exactly when a register qualifies");
      if (exp_p >= 0) begin
        cand_seen++;
        chk(er_preg == preg_t'(exp_p) && er_owr_rob == m_owr[exp_p] &&
            er_inum == m_inum[exp_p] && er_addr == m_addr[exp_p], "candidate fields");
      end
      for (int i = 0; i < N; i++)
        chk(ready_vec[i] == m_rdy[i] && int'(pending[i]) == m_pend[i], "ready and pending");
      @(negedge clk);
      if (inc1_v) m_pend[inc1_preg]++;
      if (dec1_v) m_pend[dec1_preg]--;
      if (wb_v) m_rdy[wb_preg] = 1;
      if (cm_v) begin m_rvq[cm_preg] = 1; m_addr[cm_preg] = cm_addr; m_inum[cm_preg] = cm_inum; end
      if (ow_v) begin m_ow[ow_preg] = 1; m_owr[ow_preg] = ow_rob; end
      if (owc_v) m_ow[owc_preg] = 0;
      if (alloc_v) begin
        m_ow[alloc_preg] = 0; m_rvq[alloc_preg] = 0; m_addr[alloc_preg] = 0;
        m_inum[alloc_preg] = 0; m_owr[alloc_preg] = 0; m_rdy[alloc_preg] = 0;
      end
      if (ri_v) begin
        m_ow[ri_preg] = 0; m_rvq[ri_preg] = 1; m_addr[ri_preg] = ri_addr;
        m_inum[ri_preg] = ri_inum; m_owr[ri_preg] = 0; m_rdy[ri_preg] = 1; m_pend[ri_preg] = 0;
      end
    end
    chk(cand_seen > 100, "eager-release candidates were offered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
