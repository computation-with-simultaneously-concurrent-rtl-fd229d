// Equality checker: compares the product with the recomputed product.
//
// Both results carry the same bit order here, p[k] and p_bar[k] both of
// weight 2^k (the array already routes the mirror-imaged recomputed bits
// back into that order). One XOR per bit marks a disagreeing bit and an
// OR over all bits raises mismatch; any mismatch means that a fault
// disturbed at least one of the two computations. diff shows which bits
// disagree. Purely combinational. The method calls for an equality
// checker; the XOR/OR structure and the diff output are this design's.
module bido_eq_checker #(
  parameter int unsigned W = 32  // compared width (2N for an N-bit multiplier)
) (
  input  logic [W-1:0] p,        // result of the normal computation
  input  logic [W-1:0] p_bar,    // result of the recomputation
  output logic [W-1:0] diff,     // bits that disagree
  output logic         mismatch  // any bit disagrees
);

  always_comb begin
    diff     = p ^ p_bar;
    mismatch = |diff;
  end

endmodule
