// tb_lvq: self-checking test of the ECC-protected load value queue at its
// full depth: in-order delivery, full flag, correction of every single-bit
// error position of the head codeword and detection of double-bit errors.
module tb_lvq;
  import rmt_pkg::*;
  localparam int D = LVQ_DEPTH_D;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic push, full, pop, empty, corrected_err, uncorrectable_err;
  xlen_t push_value, head_value;
  logic [ECC_W-1:0] inj_flip;
  lvq dut (.*);

  xlen_t vals [D];
  initial begin
    push = 0; pop = 0; push_value = 0; inj_flip = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      vals[i] = {$urandom, $urandom};
      push = 1; push_value = vals[i]; @(negedge clk);
    end
    push = 0;
    chk(full, "full at depth 400");
    for (int i = 0; i < D; i++) begin
      chk(head_value == vals[i] && !corrected_err && !uncorrectable_err, "clean head");
      if (i < ECC_W) begin
        inj_flip = '0; inj_flip[i] = 1'b1;
        #1 chk(head_value == vals[i] && corrected_err && !uncorrectable_err,
               $sformatf("single-bit error at codeword bit %0d corrected", i));
        inj_flip = '0; inj_flip[i] = 1'b1; inj_flip[(i + 5) % ECC_W] = 1'b1;
        #1 chk(uncorrectable_err && !corrected_err, "double-bit error detected");
        inj_flip = '0;
      end
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
