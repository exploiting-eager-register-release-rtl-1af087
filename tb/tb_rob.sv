// tb_rob: self-checking test of the reorder buffer at its full 160
// entries against a queue model: in-order allocation and commit, full
// flag, operand capture at issue, completion at writeback, eager-release
// marks, and squash steps that drop the youngest entry.
module tb_rob;
  import rmt_pkg::*;
  localparam int R = ROB_SIZE_D;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic alloc_v, full, iss_v, wb_v, wb_taken, mk_v, empty, commit, squash_step;
  rob_entry_t alloc_entry, iss_entry, head_entry, last_entry;
  rob_idx_t alloc_idx, iss_idx, wb_idx, mk_idx, head_idx, last_idx;
  xlen_t iss_val1, iss_val2, wb_aux;
  seq_t mk_inum;
  rvq_addr_t mk_addr;
  logic [$clog2(R+1)-1:0] count;
  rob dut (.*);

  typedef struct { rob_idx_t idx; rob_entry_t e; } ment_t;
  ment_t q [$];

  function automatic rob_entry_t rnd_entry();
    rob_entry_t e;
    e = '0;
    e.kind = kind_e'($urandom_range(3));
    e.has_dest = 1'($urandom); e.lreg = lreg_t'($urandom);
    e.new_preg = preg_t'($urandom); e.old_preg = preg_t'($urandom);
    e.use_src1 = 1'($urandom); e.src1_preg = preg_t'($urandom);
    e.use_src2 = 1'($urandom); e.src2_preg = preg_t'($urandom);
    return e;
  endfunction

  initial begin
    int wraps;
    alloc_v = 0; iss_v = 0; wb_v = 0; mk_v = 0; commit = 0; squash_step = 0;
    alloc_entry = '0; iss_idx = 0; wb_idx = 0; mk_idx = 0; iss_val1 = 0; iss_val2 = 0;
    wb_aux = 0; wb_taken = 0; mk_inum = 0; mk_addr = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    // fill completely
    for (int i = 0; i < R; i++) begin
      alloc_v = 1; alloc_entry = rnd_entry();
      #1 chk(alloc_idx == rob_idx_t'(i), "allocation index in order");
      q.push_back('{idx: alloc_idx, e: alloc_entry});
      @(negedge clk);
    end
    alloc_v = 0;
    chk(full && count == R, "full at 160 entries");
    wraps = 0;
    for (int c = 0; c < 8000; c++) begin
      automatic int n = q.size();
      int k;
      alloc_v = 0; iss_v = 0; wb_v = 0; mk_v = 0; commit = 0; squash_step = 0;
      // random operations on random live entries
      if (n > 0) begin
        k = $urandom_range(n - 1);
        iss_v = !q[k].e.issued && 1'($urandom); iss_idx = q[k].idx;
        iss_val1 = {$urandom, $urandom}; iss_val2 = {$urandom, $urandom};
        k = $urandom_range(n - 1);
        wb_v = 1'($urandom); wb_idx = q[k].idx; wb_aux = {$urandom, $urandom};
        wb_taken = 1'($urandom);
        if (wb_v && iss_v && wb_idx == iss_idx) iss_v = 0;
        k = $urandom_range(n - 1);
        mk_v = ($urandom_range(3) == 0); mk_idx = q[k].idx; mk_inum = $urandom;
        mk_addr = rvq_addr_t'($urandom);
        if (mk_v && ((iss_v && mk_idx == iss_idx) || (wb_v && mk_idx == wb_idx))) mk_v = 0;
        commit = q[0].e.complete && 1'($urandom);
      end
      if ($urandom_range(9) == 0 && n > 1) begin
        squash_step = 1;
      end else begin
        alloc_v = (n < R) && 1'($urandom); alloc_entry = rnd_entry();
      end
      #1;
      chk(empty == (n == 0) && full == (n == R) && count == n, $sformatf("occupancy c=%0d n=%0d count=%0d", c, n, count));
      if (n > 0) begin
        chk(head_idx == q[0].idx && head_entry == q[0].e, "head entry");
        chk(last_idx == q[n-1].idx && last_entry == q[n-1].e, "youngest entry");
      end
      if (alloc_v) chk(alloc_idx == rob_idx_t'((int'(q[n-1].idx) + 1) % R), "tail follows youngest");
      @(negedge clk);
      for (int j = 0; j < n; j++) begin
        if (iss_v && q[j].idx == iss_idx) begin
          q[j].e.issued = 1; q[j].e.src1_val = iss_val1; q[j].e.src2_val = iss_val2;
        end
        if (wb_v && q[j].idx == wb_idx) begin
          q[j].e.complete = 1; q[j].e.aux = wb_aux; q[j].e.taken = wb_taken;
        end
        if (mk_v && q[j].idx == mk_idx) begin
          q[j].e.dealloc = 1; q[j].e.inum = mk_inum; q[j].e.rvq_addr = mk_addr;
        end
      end
      if (squash_step) void'(q.pop_back());
      if (commit) begin
        if (q[0].idx == rob_idx_t'(R - 1)) wraps++;
        void'(q.pop_front());
      end
      if (alloc_v) begin
        automatic rob_idx_t t = (q.size() == 0) ? alloc_idx : rob_idx_t'((int'(q[q.size()-1].idx) + 1) % R);
        q.push_back('{idx: t, e: alloc_entry});
      end
    end
    chk(wraps > 0, "head wrapped around the buffer");
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
