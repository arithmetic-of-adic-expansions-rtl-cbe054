// tau_pkg: types and constants shared by the tau-adic arithmetic unit.
//
// The unit computes additions of (partial) tau-adic expansions and the product
// b x K of an integer b with a tau-adic expansion K, word-serially, on a
// W-bit RAM.  This package holds the operation codes seen by the host, the
// command the multiplication controller hands to the addition sequencer and
// the RAM region selectors.  Address width is fixed here (AW) so that the
// command struct can be shared; the RAM depth itself is a module parameter.
package tau_pkg;

  // Address width of the operand RAM (up to 1024 words).
  localparam int unsigned AW = 10;

  typedef logic [AW-1:0] addr_t;

  // Host-level operations.
  typedef enum logic [1:0] {
    OP_ADD1 = 2'd0,  // C = A + B with Alg. 1 (plain tau-adic addition)
    OP_ADD6 = 2'd1,  // (C,g) = (A,a) [+] (B,b) with Alg. 6 (partial expansions)
    OP_MUL7 = 2'd2,  // b x K, double-and-add on partial expansions (Alg. 7)
    OP_MUL8 = 2'd3   // b x K, Montgomery ladder on partial expansions (Alg. 8)
  } op_e;

  // RAM regions that hold expansions.  Each region has the layout given in
  // tau_arith_top: expansion words, one remainder word, then (region K only)
  // the sign plane of a signed-digit expansion.
  typedef enum logic [1:0] {
    REG_K = 2'd0,  // signed-digit input expansion K
    REG_B = 2'd1,  // binary copy of K (Alg. 7)
    REG_C = 2'd2,  // accumulator C (result)
    REG_D = 2'd3   // accumulator D (Alg. 8)
  } region_e;

  // One addition job for the sequencer: dst = srcA (+) srcB.
  typedef struct packed {
    logic  alg1;      // 1: Alg. 1 (carry until done), 0: Alg. 6 (exactly m digits)
    logic  b_signed;  // operand B is signed-digit: read its sign plane too
    logic  a_zero;    // operand A is the constant (0,(0,0)); its reads return zero
    addr_t a_base;
    addr_t b_base;
    addr_t d_base;
  } seq_cmd_t;

endpackage
