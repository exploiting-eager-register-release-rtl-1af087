// rmt_pkg: shared constants, types and ECC functions of the redundantly
// multi-threaded (RMT) register-release design.
//
// The default sizes follow the evaluated single-thread configuration: a
// 160-entry reorder buffer, a 50-entry physical register file (the size at
// which eager release matches an 80-entry conventional file), RVQ/BOQ/LVQ
// depths of 600/200/400 and 64-bit Alpha registers, 32 of them logical.
// The store buffer depth, sequence-number width and instruction classes
// are this design's own choices.
package rmt_pkg;

  localparam int unsigned XLEN        = 64;   // Alpha AXP register width
  localparam int unsigned NUM_LREGS   = 32;   // Alpha integer logical registers
  localparam int unsigned LREG_W      = 5;
  localparam int unsigned NUM_PREGS_D = 50;
  localparam int unsigned ROB_SIZE_D  = 160;
  localparam int unsigned RVQ_DEPTH_D = 600;
  localparam int unsigned BOQ_DEPTH_D = 200;
  localparam int unsigned LVQ_DEPTH_D = 400;
  localparam int unsigned STB_DEPTH_D = 64;
  localparam int unsigned SEQ_W       = 32;   // RVQ sequence number (inum)

  // ECC word: 64 data bits, 7 Hamming check bits, 1 overall parity bit.
  localparam int unsigned ECC_W       = 72;

  // Index widths cover the largest configurations evaluated (register
  // files of up to 200 entries, a 160-entry ROB, a 600-entry RVQ).
  localparam int unsigned PREG_W  = 8;
  localparam int unsigned ROB_W   = 8;
  localparam int unsigned RVQ_AW  = 10;

  typedef logic [XLEN-1:0]   xlen_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [ROB_W-1:0]  rob_idx_t;
  typedef logic [RVQ_AW-1:0] rvq_addr_t;
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  typedef enum logic [1:0] {
    K_ALU    = 2'd0,
    K_LOAD   = 2'd1,
    K_STORE  = 2'd2,
    K_BRANCH = 2'd3
  } kind_e;

  // One instruction offered to rename.
  typedef struct packed {
    kind_e  kind;
    logic   has_dest;
    lreg_t  dest;
    logic   use_src1;
    lreg_t  src1;
    logic   use_src2;
    lreg_t  src2;
  } rename_req_t;

  // Reorder buffer entry. The last four fields record an eager release
  // this instruction caused: the de-allocate bit, the inum (RVQ sequence
  // number) and RVQ address of the released value's producer; old_preg and
  // lreg name the released register and its logical register.
  typedef struct packed {
    kind_e     kind;
    logic      complete;
    logic      issued;
    logic      has_dest;
    lreg_t     lreg;
    preg_t     new_preg;
    preg_t     old_preg;
    logic      use_src1;
    preg_t     src1_preg;
    logic      use_src2;
    preg_t     src2_preg;
    xlen_t     src1_val;
    xlen_t     src2_val;
    xlen_t     aux;        // store address or branch target
    logic      taken;      // branch outcome
    logic      dealloc;
    seq_t      inum;
    rvq_addr_t rvq_addr;
  } rob_entry_t;

  // Branch outcome carried to the trailer.
  typedef struct packed {
    logic  taken;
    xlen_t target;
  } boq_entry_t;

  // Store carried from a core to the store buffer.
  typedef struct packed {
    xlen_t addr;
    xlen_t data;
  } store_t;

  // ---------------------------------------------------------------------
  // SEC-DED Hamming code for a 64-bit word. Codeword positions 1..71 hold
  // the Hamming code (check bits at the power-of-two positions), bit 0 is
  // the overall parity of positions 1..71.
  // ---------------------------------------------------------------------
  function automatic logic [ECC_W-1:0] ecc_encode(input xlen_t d);
    logic [ECC_W-1:0] cw;
    int unsigned k;
    cw = '0;
    k  = 0;
    for (int unsigned pos = 1; pos < ECC_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        cw[pos] = d[k];
        k++;
      end
    end
    for (int unsigned c = 0; c < 7; c++) begin
      logic p;
      p = 1'b0;
      for (int unsigned pos = 1; pos < ECC_W; pos++)
        if (((pos >> c) & 1) != 0 && pos != (1 << c)) p ^= cw[pos];
      cw[1 << c] = p;
    end
    cw[0] = ^cw[ECC_W-1:1];
    return cw;
  endfunction

  // Returns the corrected data; single = a one-bit error was corrected,
  // double = an uncorrectable two-bit error was seen.
  function automatic xlen_t ecc_decode(input logic [ECC_W-1:0] cw_in,
                                       output logic single,
                                       output logic double);
    logic [ECC_W-1:0] cw;
    logic [6:0] syn;
    logic       par;
    xlen_t      d;
    int unsigned k;
    cw  = cw_in;
    syn = '0;
    for (int unsigned pos = 1; pos < ECC_W; pos++)
      if (cw[pos]) syn ^= 7'(pos);
    par    = ^cw;
    single = 1'b0;
    double = 1'b0;
    if (syn != 0 && par) begin
      single = 1'b1;
      if (int'(syn) < ECC_W) cw[syn] = ~cw[syn];
    end else if (syn == 0 && par) begin
      single = 1'b1;                  // the overall parity bit itself
    end else if (syn != 0) begin
      double = 1'b1;
    end
    d = '0;
    k = 0;
    for (int unsigned pos = 1; pos < ECC_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        d[k] = cw[pos];
        k++;
      end
    end
    return d;
  endfunction

endpackage
