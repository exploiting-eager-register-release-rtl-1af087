// tb_rvq: self-checking test of the register value queue at its full
// depth. Fills the queue with known entries, checks full, the in-order
// head, the sequence numbers, the random recovery read and the present
// test as entries are consumed, and simultaneous push and pop.
module tb_rvq;
  import rmt_pkg::*;
  localparam int D = RVQ_DEPTH_D;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic push, pop, full, empty, rd_present;
  lreg_t push_lreg, head_lreg;
  xlen_t push_value, push_src1, push_src2, head_value, head_src1, head_src2, rd_value;
  rvq_addr_t push_addr, rd_addr;
  seq_t push_seq, head_seq, rd_seq;
  logic [$clog2(D+1)-1:0] count;

  rvq dut (.*);

  function automatic xlen_t val(input int i); return {32'(i) * 32'h9E3779B1, 32'(i)}; endfunction

  rvq_addr_t addr_of [D+20];
  initial begin
    push = 0; pop = 0; push_lreg = 0; push_value = 0; push_src1 = 0; push_src2 = 0;
    rd_addr = 0; rd_seq = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(empty && count == 0, "empty after reset");
    for (int i = 0; i < D; i++) begin
      push = 1; push_lreg = lreg_t'(i); push_value = val(i); push_src1 = val(i) + 1;
      push_src2 = val(i) + 2;
      #1;
      if (i < 3 || i == D - 1) chk(push_seq == seq_t'(i), "push_seq numbers pushes");
      addr_of[i] = push_addr;
      @(negedge clk);
    end
    push = 0;
    #1 chk(full && count == D, "full at depth 600");
    // a push while full is dropped
    push = 1; push_value = '1; @(negedge clk); push = 0;
    chk(count == D, "push ignored when full");
    // random reads of entries
    for (int k = 0; k < 20; k++) begin
      automatic int i = $urandom_range(D - 1);
      rd_addr = addr_of[i]; rd_seq = seq_t'(i);
      #1 chk(rd_value == val(i) && rd_present, "random read returns queued value");
    end
    // consume 10 entries
    for (int i = 0; i < 10; i++) begin
      chk(head_value == val(i) && head_lreg == lreg_t'(i) && head_src1 == val(i) + 1 &&
          head_src2 == val(i) + 2 && head_seq == seq_t'(i), "head in order");
      pop = 1; @(negedge clk); pop = 0;
    end
    rd_addr = addr_of[5]; rd_seq = 5;
    #1 chk(!rd_present, "consumed entry is no longer present");
    rd_addr = addr_of[10]; rd_seq = 10;
    #1 chk(rd_present && rd_value == val(10), "oldest remaining entry present");
    // simultaneous push and pop keeps the count
    push = 1; pop = 1; push_lreg = 7; push_value = val(D); push_src1 = 0; push_src2 = 0;
    #1 addr_of[D] = push_addr;
    @(negedge clk); push = 0; pop = 0;
    chk(count == D - 10, "push and pop together keep the count");
    rd_addr = addr_of[D]; rd_seq = seq_t'(D);
    #1 chk(rd_present && rd_value == val(D), "wrapped entry readable");
    // drain
    for (int i = 11; i <= D; i++) begin
      chk(head_value == val(i), "drain order");
      pop = 1; @(negedge clk); pop = 0;
    end
    chk(empty, "empty after drain");
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
