// rsa_pkg: types and constants shared by the RSA co-processor.
//
// The Montgomery multiplier is a linear systolic array. A small token travels
// from processing element (PE) 0 towards the top PE, one PE per clock cycle,
// and tells each PE which iteration of which multiplication it is working on.
// The token carries the multiplier bit a_i, the quotient bit q_i (decided by
// PE 0), flags for the first and last iteration, and the choice of the B
// operand. Carrying the B choice in the token lets two multiplications with
// different B operands overlap inside the array.
package rsa_pkg;

  // Which value the B operand of a Montgomery multiplication comes from.
  typedef enum logic [1:0] {
    BSEL_P   = 2'd0,  // the accumulator P (squaring: P*P)
    BSEL_M   = 2'd1,  // the message in Montgomery form (multiply: P*M~)
    BSEL_ONE = 2'd2   // the constant 1 (leave the Montgomery domain: P*1)
  } bsel_e;

  // Token passed from PE j to PE j+1.
  typedef struct packed {
    logic  valid;  // the receiving PE works this cycle
    logic  a;      // multiplier bit a_i
    logic  q;      // quotient bit q_i (filled in by PE 0)
    logic  first;  // iteration 0: the partial sum S is zero
    logic  last;   // final iteration: the PE writes a result bit
    bsel_e bsel;   // B operand of this multiplication
  } mmm_token_t;

  // Bus register regions of the co-processor (upper address bits).
  typedef enum logic [2:0] {
    REG_CTRL   = 3'd0,  // word 0: control/status, word 1: cycle count
    REG_MOD    = 3'd1,  // modulus N
    REG_MSG    = 3'd2,  // message M
    REG_EXP    = 3'd3,  // exponent E
    REG_RESULT = 3'd4   // result M^E mod N (read only)
  } reg_region_e;

endpackage
