// tb_phys_regfile: self-checking test of the physical register file with
// its default 50 entries, 8 read and 4 write ports, against a model.
module tb_phys_regfile;
  import rmt_pkg::*;
  localparam int N = NUM_PREGS_D, NR = 8, NW = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  preg_t raddr [NR];
  xlen_t rdata [NR];
  logic  we [NW];
  preg_t waddr [NW];
  xlen_t wdata [NW];
  phys_regfile dut (.*);

  xlen_t model [N];
  initial begin
    foreach (we[w]) begin we[w] = 0; waddr[w] = 0; wdata[w] = 0; end
    foreach (raddr[r]) raddr[r] = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int c = 0; c < 2000; c++) begin
      foreach (we[w]) begin
        we[w] = 1'($urandom); waddr[w] = preg_t'($urandom_range(N - 1));
        wdata[w] = {$urandom, $urandom};
      end
      foreach (raddr[r]) raddr[r] = preg_t'($urandom_range(N - 1));
      #1 foreach (raddr[r]) chk(rdata[r] == model[raddr[r]], "read port value");
      @(negedge clk);
      foreach (we[w]) if (we[w]) model[waddr[w]] = wdata[w];
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
