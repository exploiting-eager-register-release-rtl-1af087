// phys_regfile: physical register file of the leading core.
//
// NUM_PREGS 64-bit registers with NR combinational read ports and NW write
// ports written at the clock edge; when two write ports name the same
// register in one cycle the higher-numbered port wins. The default of
// 8 read and 4 write ports and 50 entries is the single-thread file of the
// evaluation; the leading core instantiates it with the ports its
// one-wide pipeline needs. All registers reset to zero so that the initial
// architectural state equals the trailer's.
module phys_regfile
  import rmt_pkg::*;
#(
  parameter int unsigned NUM_PREGS = NUM_PREGS_D,
  parameter int unsigned NR        = 8,
  parameter int unsigned NW        = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  preg_t         raddr [NR],
  output xlen_t         rdata [NR],
  input  logic          we    [NW],
  input  preg_t         waddr [NW],
  input  xlen_t         wdata [NW]
);
  xlen_t regs [NUM_PREGS];

  always_comb
    for (int r = 0; r < NR; r++) rdata[r] = regs[raddr[r]];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_PREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NW; w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end
endmodule
