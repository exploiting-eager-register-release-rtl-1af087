// tb_trailing_checker: self-checking test of the trailer's checking stage.
// Matching results update the trailer register file, a mismatching value
// or register raises the error and leaves the file unchanged, the copy-back
// read port returns the checked state, and bit-flip injection corrupts
// exactly one bit.
module tb_trailing_checker;
  import rmt_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic res_valid, res_ready, rvq_empty, rvq_pop, error, inj_valid;
  lreg_t res_lreg, rvq_lreg, rd_lreg, inj_lreg;
  xlen_t res_value, rvq_value, rd_value;
  logic [5:0] inj_bit;
  trailing_checker dut (.*);

  xlen_t model [NUM_LREGS];
  initial begin
    res_valid = 0; rvq_empty = 1; res_lreg = 0; rvq_lreg = 0; res_value = 0;
    rvq_value = 0; rd_lreg = 0; inj_valid = 0; inj_lreg = 0; inj_bit = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(!res_ready && !rvq_pop, "no check while RVQ empty");
    for (int n = 0; n < 400; n++) begin
      automatic int kind = $urandom_range(9);
      automatic lreg_t l = lreg_t'($urandom);
      automatic xlen_t v = {$urandom, $urandom};
      rvq_empty = 0; rvq_lreg = l; rvq_value = v;
      res_valid = 1; res_lreg = l; res_value = v;
      if (kind == 0) res_value = v ^ 64'h1;
      if (kind == 1) res_lreg = l + 1'b1;
      #1;
      chk(rvq_pop && res_ready, "entry consumed");
      chk(error == (kind <= 1), "error exactly on disagreement");
      @(negedge clk);
      if (kind > 1) model[l] = v;
      res_valid = 0; rvq_empty = 1;
      rd_lreg = lreg_t'($urandom);
      #1 chk(rd_value == model[rd_lreg], "copy-back read returns checked value");
    end
    inj_valid = 1; inj_lreg = 9; inj_bit = 17; @(negedge clk); inj_valid = 0;
    model[9][17] = ~model[9][17];
    for (int i = 0; i < NUM_LREGS; i++) begin
      rd_lreg = lreg_t'(i);
      #1 chk(rd_value == model[i], "only the injected bit changed");
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
