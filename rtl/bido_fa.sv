// Array-multiplier cell: one partial-product AND gate feeding a full adder.
//
// The cell forms the bit product m_bit & q_bit and adds it to the sum bit
// arriving from the previous row (sum_in) and the carry arriving from the
// neighbouring, less significant cell of the same row (carry_in). It is the
// plain FA element of a ripple-row array multiplier; the central columns C1
// and C2 of the BIDO array are built from it directly and every
// bi-directional cell (bido_bfa) contains one. Purely combinational.
// The method only names this element; the logic-level form is this
// design's choice.
module bido_fa (
  input  logic m_bit,     // multiplicand bit
  input  logic q_bit,     // multiplier bit
  input  logic sum_in,    // sum bit from the previous row
  input  logic carry_in,  // carry from the less significant neighbour
  output logic sum,       // sum bit to the next row
  output logic carry      // carry to the more significant neighbour
);

  logic pp;

  assign pp    = m_bit & q_bit;
  assign sum   = pp ^ sum_in ^ carry_in;
  assign carry = (pp & sum_in) | (pp & carry_in) | (sum_in & carry_in);

endmodule
