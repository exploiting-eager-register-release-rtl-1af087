// rename_table: logical-to-physical register map of the leading thread.
//
// NUM_LREGS entries, reset to the identity map (logical register i in
// physical register i). Three combinational read ports serve the two
// sources and the old mapping of the destination of the instruction being
// renamed; one write port installs the new destination mapping. On a
// squash the recovery walk rewrites one entry per cycle with the mapping
// saved in the squashed instruction's ROB entry (rst_we); the two writes
// never happen in the same cycle, and restore wins if they did. Recovery
// by ROB walk-back is this design's choice.
module rename_table
  import rmt_pkg::*;
#(
  parameter int unsigned NUM_PREGS = NUM_PREGS_D
) (
  input  logic          clk,
  input  logic          rst,
  input  lreg_t         src1,
  input  lreg_t         src2,
  input  lreg_t         dest,
  output preg_t         src1_preg,
  output preg_t         src2_preg,
  output preg_t         dest_old_preg,
  input  logic          we,
  input  preg_t         we_preg,
  input  logic          rst_we,
  input  lreg_t         rst_lreg,
  input  preg_t         rst_preg
);
  preg_t map [NUM_LREGS];

  assign src1_preg     = map[src1];
  assign src2_preg     = map[src2];
  assign dest_old_preg = map[dest];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_LREGS; i++) map[i] <= preg_t'(i);
    end else if (rst_we) begin
      map[rst_lreg] <= rst_preg;
    end else if (we) begin
      map[dest] <= we_preg;
    end
  end

  initial assert (NUM_PREGS > NUM_LREGS)
    else $error("need more physical than logical registers");
endmodule
