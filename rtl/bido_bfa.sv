// Bi-directional full adder (BFA), the cell of the side parts M1 and M2.
//
// The cell has two complete sets of inputs. The normal set carries the bit
// pair m_a, q_b of the normal computation with the sum from the row above
// and the carry from the less significant neighbour; the reverse set
// carries the bit pair of the recomputation (the same operands fed in from
// the opposite side of the array) with the sum from the row below and the
// carry from the more significant neighbour. A bi-switch picks one set
// according to dir and a single full adder does the work, so one adder
// serves the normal computation in one half-computation and the
// recomputation in the other. The sum and carry outputs are wired to the
// neighbours of both directions; whichever side is listening takes them.
// Purely combinational. Because the outputs also reach the cells this cell
// listens to in the other direction, an array of BFAs contains structural
// loops through the bi-switches; they are never active, since neighbouring
// cells of one part always share the same dir (see bido_array).
module bido_bfa
  import bido_pkg::*;
(
  input  dir_e dir,          // bi-switch setting
  // normal-direction inputs
  input  logic m_n,          // multiplicand bit, normal copy
  input  logic q_n,          // multiplier bit, normal copy
  input  logic sum_in_n,     // sum from the row above
  input  logic carry_in_n,   // carry from the column to the right
  // reverse-direction inputs
  input  logic m_r,          // multiplicand bit, recomputation copy
  input  logic q_r,          // multiplier bit, recomputation copy
  input  logic sum_in_r,     // sum from the row below
  input  logic carry_in_r,   // carry from the column to the left
  // outputs, seen by the neighbours of both directions
  output logic sum,
  output logic carry
);

  logic [3:0] sel;

  bido_bi_switch #(.W(4)) u_switch (
    .dir      (dir),
    .from_norm({m_n, q_n, sum_in_n, carry_in_n}),
    .from_rev ({m_r, q_r, sum_in_r, carry_in_r}),
    .to_cell  (sel)
  );

  bido_fa u_fa (
    .m_bit   (sel[3]),
    .q_bit   (sel[2]),
    .sum_in  (sel[1]),
    .carry_in(sel[0]),
    .sum     (sum),
    .carry   (carry)
  );

endmodule
