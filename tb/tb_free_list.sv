// tb_free_list: self-checking test of the free-register pool: 18 free
// registers after reset, lowest-first allocation until empty, the three
// release ports, reclaim of a chosen register and the free count.
module tb_free_list;
  import rmt_pkg::*;
  localparam int N = NUM_PREGS_D;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic alloc, alloc_ok, rel_commit, rel_eager, rel_squash, reclaim;
  preg_t alloc_preg, rel_commit_preg, rel_eager_preg, rel_squash_preg, reclaim_preg;
  logic [N-1:0] free_vec;
  logic [$clog2(N+1)-1:0] free_count;
  free_list dut (.*);

  bit model [N];
  function automatic int lowest();
    for (int i = 0; i < N; i++) if (model[i]) return i;
    return -1;
  endfunction
  function automatic int cnt();
    int n = 0;
    for (int i = 0; i < N; i++) n += model[i];
    return n;
  endfunction

  initial begin
    alloc = 0; rel_commit = 0; rel_eager = 0; rel_squash = 0; reclaim = 0;
    rel_commit_preg = 0; rel_eager_preg = 0; rel_squash_preg = 0; reclaim_preg = 0;
    for (int i = 0; i < N; i++) model[i] = (i >= NUM_LREGS);
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(free_count == N - NUM_LREGS, "18 registers free after reset");
    for (int i = 0; i < N - NUM_LREGS; i++) begin
      alloc = 1;
      #1 chk(alloc_ok && alloc_preg == preg_t'(NUM_LREGS + i), "lowest free first");
      @(negedge clk);
    end
    alloc = 0;
    for (int i = 0; i < N; i++) model[i] = 0;
    #1 chk(!alloc_ok && free_count == 0, "pool empty");
    for (int c = 0; c < 3000; c++) begin
      int l, a, b, s, r;
      alloc = 1'($urandom);
      l = lowest();
      // pick distinct registers for the other ports
      a = $urandom_range(N - 1); b = $urandom_range(N - 1);
      s = $urandom_range(N - 1); r = $urandom_range(N - 1);
      rel_commit = !model[a] && a != l;
      rel_commit_preg = preg_t'(a);
      rel_eager = !model[b] && b != a && b != l;
      rel_eager_preg = preg_t'(b);
      rel_squash = !model[s] && s != a && s != b && s != l;
      rel_squash_preg = preg_t'(s);
      reclaim = model[r] && r != l && r != a && r != b && r != s && $urandom_range(3) == 0;
      reclaim_preg = preg_t'(r);
      #1;
      chk(alloc_ok == (l >= 0), "alloc_ok when a register is free");
      if (l >= 0) chk(alloc_preg == preg_t'(l), "allocates lowest free");
      chk(free_count == cnt(), "free count");
      @(negedge clk);
      if (alloc && l >= 0) model[l] = 0;
      if (rel_commit) model[a] = 1;
      if (rel_eager) model[b] = 1;
      if (rel_squash) model[s] = 1;
      if (reclaim) model[r] = 0;
      for (int i = 0; i < N; i++) chk(free_vec[i] == model[i], "free vector");
    end
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
