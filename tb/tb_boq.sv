// tb_boq: self-checking test of the branch outcome queue at its full
// depth: in-order outcomes, full flag, push and pop in the same cycle.
module tb_boq;
  import rmt_pkg::*;
  localparam int D = BOQ_DEPTH_D;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic push, full, pop, empty;
  boq_entry_t push_entry, head_entry;
  logic [$clog2(D+1)-1:0] count;
  boq dut (.*);

  boq_entry_t model [$];
  initial begin
    push = 0; pop = 0; push_entry = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      push = 1; push_entry = '{taken: 1'($urandom), target: {$urandom, $urandom}};
      model.push_back(push_entry);
      @(negedge clk);
    end
    push = 0;
    chk(full && count == D, "full at depth 200");
    for (int c = 0; c < 3 * D; c++) begin
      automatic bit p = 1'($urandom) && !full, q = 1'($urandom) && !empty;
      if (!empty) chk(head_entry == model[0], "head outcome in order");
      push = p; pop = q;
      push_entry = '{taken: 1'($urandom), target: {$urandom, $urandom}};
      @(negedge clk);
      if (q) void'(model.pop_front());
      if (p) model.push_back(push_entry);
      push = 0; pop = 0;
      chk(count == model.size(), "occupancy matches");
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
