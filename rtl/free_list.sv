// free_list: pool of free physical registers of the leading core.
//
// A bit vector with one bit per physical register (1 = free). At reset the
// registers above the NUM_LREGS identity-mapped ones are free. alloc takes
// the lowest-numbered free register (alloc_preg, valid when alloc_ok) at
// the clock edge. Three release ports return registers: conventional
// release when the overwriting instruction commits, eager release, and
// release of a squashed instruction's destination. reclaim takes a given
// register out of the pool again, used when recovery re-instates an
// eagerly released value. Releases, reclaim and allocation all take
// effect at the clock edge; callers never name the same register on two
// ports in one cycle. The bit-vector organisation is this design's choice:
// it lets recovery take back a specific register.
module free_list
  import rmt_pkg::*;
#(
  parameter int unsigned NUM_PREGS = NUM_PREGS_D
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          alloc,
  output logic          alloc_ok,
  output preg_t         alloc_preg,
  input  logic          rel_commit,
  input  preg_t         rel_commit_preg,
  input  logic          rel_eager,
  input  preg_t         rel_eager_preg,
  input  logic          rel_squash,
  input  preg_t         rel_squash_preg,
  input  logic          reclaim,
  input  preg_t         reclaim_preg,
  output logic [NUM_PREGS-1:0] free_vec,
  output logic [$clog2(NUM_PREGS+1)-1:0] free_count
);
  always_comb begin
    alloc_ok   = 1'b0;
    alloc_preg = '0;
    free_count = '0;
    for (int i = NUM_PREGS - 1; i >= 0; i--) begin
      if (free_vec[i]) begin
        alloc_ok   = 1'b1;
        alloc_preg = preg_t'(i);
      end
    end
    for (int i = 0; i < NUM_PREGS; i++)
      free_count += ($clog2(NUM_PREGS+1))'(free_vec[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_PREGS; i++) free_vec[i] <= (i >= NUM_LREGS);
    end else begin
      if (alloc && alloc_ok) free_vec[alloc_preg]      <= 1'b0;
      if (rel_commit)        free_vec[rel_commit_preg] <= 1'b1;
      if (rel_eager)         free_vec[rel_eager_preg]  <= 1'b1;
      if (rel_squash)        free_vec[rel_squash_preg] <= 1'b1;
      if (reclaim)           free_vec[reclaim_preg]    <= 1'b0;
    end
  end

  a_no_double_free: assert property (@(posedge clk) disable iff (rst)
      (rel_commit |-> !free_vec[rel_commit_preg]) and
      (rel_eager  |-> !free_vec[rel_eager_preg])  and
      (rel_squash |-> !free_vec[rel_squash_preg]));
endmodule
