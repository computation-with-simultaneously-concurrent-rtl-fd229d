// Shared types of the bi-directional-operand (BIDO) array multiplier.
//
// dir_e names the two directions in which a computation can flow through
// the array: the normal computation enters at the least significant corner
// and moves towards the most significant one, the recomputation enters with
// the same operands from the opposite corner and moves the other way.
// state_e names the phases of one multiplication: T1 is the first
// half-computation, T2 the second one after the bi-switches have turned.
// The encodings are this design's own choice.
package bido_pkg;

  typedef enum logic {
    DIR_NORMAL  = 1'b0,  // data flows from column 0 towards column 2N-2
    DIR_REVERSE = 1'b1   // data flows from column 2N-2 towards column 0
  } dir_e;

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // no multiplication in progress
    ST_T1   = 2'd1,  // first half-computation (M1+C1 normal, M2+C2 reverse)
    ST_T2   = 2'd2   // second half-computation (M2 normal, M1 reverse)
  } state_e;

endpackage
