// tb_rename_table: self-checking test of the rename table against a model:
// identity map after reset, rename writes, restore writes (which win over
// a simultaneous rename), and the three read ports.
module tb_rename_table;
  import rmt_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  lreg_t src1, src2, dest, rst_lreg;
  preg_t src1_preg, src2_preg, dest_old_preg, we_preg, rst_preg;
  logic we, rst_we;
  rename_table dut (.*);

  preg_t model [NUM_LREGS];
  initial begin
    src1 = 0; src2 = 0; dest = 0; we = 0; we_preg = 0; rst_we = 0; rst_lreg = 0; rst_preg = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < NUM_LREGS; i++) begin
      model[i] = preg_t'(i);
      dest = lreg_t'(i);
      #1 chk(dest_old_preg == preg_t'(i), "identity map after reset");
    end
    for (int c = 0; c < 1000; c++) begin
      src1 = lreg_t'($urandom); src2 = lreg_t'($urandom); dest = lreg_t'($urandom);
      we = 1'($urandom); we_preg = preg_t'($urandom_range(NUM_PREGS_D - 1));
      rst_we = ($urandom_range(3) == 0); rst_lreg = lreg_t'($urandom);
      rst_preg = preg_t'($urandom_range(NUM_PREGS_D - 1));
      #1 chk(src1_preg == model[src1] && src2_preg == model[src2] &&
             dest_old_preg == model[dest], "read ports follow the map");
      @(negedge clk);
      if (rst_we) model[rst_lreg] = rst_preg;
      else if (we) model[dest] = we_preg;
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
