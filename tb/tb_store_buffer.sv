// tb_store_buffer: self-checking test of the store buffer: leader stores
// are written to memory only when the trailer's copy matches, a mismatch
// raises the error and writes nothing, and the buffer fills at its depth.
module tb_store_buffer;
  import rmt_pkg::*;
  localparam int D = STB_DEPTH_D;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ld_push, full, trl_valid, trl_ready, mem_we, error;
  store_t ld_store, trl_store;
  xlen_t mem_addr, mem_data;
  logic [$clog2(D+1)-1:0] count;
  store_buffer dut (.*);

  store_t st [D];
  initial begin
    ld_push = 0; trl_valid = 0; ld_store = '0; trl_store = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(!trl_ready && !mem_we, "nothing to check after reset");
    for (int i = 0; i < D; i++) begin
      st[i] = '{addr: {$urandom, $urandom}, data: {$urandom, $urandom}};
      ld_push = 1; ld_store = st[i]; @(negedge clk);
    end
    ld_push = 0;
    chk(full && count == D, "full at depth");
    for (int i = 0; i < D; i++) begin
      automatic bit bad = (i % 7 == 3);
      trl_valid = 1; trl_store = st[i];
      if (bad) trl_store.data[i % 64] = ~trl_store.data[i % 64];
      #1;
      if (bad) chk(error && !mem_we, "mismatching store flagged, not written");
      else     chk(mem_we && !error && mem_addr == st[i].addr && mem_data == st[i].data,
                   "matching store written to memory");
      @(negedge clk);
      trl_valid = 0;
      #1 chk(!mem_we && !error, "no write without a trailer store");
    end
    chk(count == 0 && !trl_ready, "empty after all checks");
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
