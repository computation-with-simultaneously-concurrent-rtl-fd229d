// Bi-switch: connects a cell's inputs to one of its two neighbour sets.
//
// Every bi-directional cell sits between the neighbours it uses when data
// flows in the normal direction and the ones it uses when data flows in the
// reverse direction. The bi-switch passes the normal-side bundle when
// dir is DIR_NORMAL and the reverse-side bundle when dir is DIR_REVERSE, so
// a single control signal turns the propagation direction of a whole part
// of the array. In silicon this is a set of transmission gates; here it is
// a W-bit two-way selector. Purely combinational. Which lines are switched
// (W) is this design's choice.
module bido_bi_switch
  import bido_pkg::*;
#(
  parameter int unsigned W = 4  // bundle width (operand bits, sum, carry)
) (
  input  dir_e         dir,       // propagation direction
  input  logic [W-1:0] from_norm, // bundle from the normal-direction side
  input  logic [W-1:0] from_rev,  // bundle from the reverse-direction side
  output logic [W-1:0] to_cell    // bundle delivered to the cell
);

  always_comb begin
    unique case (dir)
      DIR_NORMAL:  to_cell = from_norm;
      DIR_REVERSE: to_cell = from_rev;
      default:     to_cell = from_norm;
    endcase
  end

endmodule
