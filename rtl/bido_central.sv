// Central part C of the BIDO array: the two duplicated middle columns C1
// and C2 and the registers that hold the half-computation results.
//
// The middle column (column N-1, the column of p[N-1]) is the border
// between the side parts M1 (columns 0..N-2) and M2 (columns N..2N-2). It
// exists twice. C1 is a column of N plain cells that belongs to the normal
// computation: in T1 it finishes the low half of the normal product
// together with M1. C2 is an identical column that belongs to the
// recomputation and finishes its first half together with M2. Cell r of C1
// is the normal-direction cell of row r (bit pair m[N-1-r], q[r]); cell k of
// C2 is the reverse-direction cell of recomputation row k (bit pair
// m_bar[N-1-k], q_bar[k]). Each column's sums run from cell to cell; the
// carries leaving the column are what the other half of the computation
// needs.
//
// At the end of T1 (hold = 1 at a rising clock edge) the carries leaving C1
// towards M2 and those leaving C2 towards M1 are captured. In T2 the
// bi-switches of M1 and M2 have turned and the held bits drive M2 (normal
// computation) and M1 (recomputation). Holding these carries in registers
// is this design's own realisation of the hold in the central part.
//
// Inputs c1_cin[r] is the normal carry from M1 into C1 cell r
// (r = 0..N-2, row N-1 has none), c2_cin[k] the reverse carry from M2 into
// C2 cell k. Outputs p_mid and pbar_mid are bit N-1 of the product and of
// the recomputed product, valid combinationally during T1.
module bido_central #(
  parameter int unsigned N = 16  // operand width
) (
  input  logic         clk,
  input  logic         rst_n,      // asynchronous, active low
  input  logic         hold,       // capture the crossing carries (end of T1)
  input  logic [N-1:0] m,          // multiplicand, normal copy
  input  logic [N-1:0] q,          // multiplier, normal copy
  input  logic [N-1:0] m_bar,      // multiplicand, recomputation copy
  input  logic [N-1:0] q_bar,      // multiplier, recomputation copy
  input  logic [N-2:0] c1_cin,     // carries from M1 into C1
  input  logic [N-2:0] c2_cin,     // carries from M2 into C2
  output logic [N-1:0] hold_n,     // held C1 carries, drive M2 in T2
  output logic [N-1:0] hold_r,     // held C2 carries, drive M1 in T2
  output logic         p_mid,      // product bit N-1
  output logic         pbar_mid    // recomputed product bit N-1
);

  logic [N-1:0] c1_sum, c1_carry;
  logic [N-1:0] c2_sum, c2_carry;

  for (genvar r = 0; r < N; r++) begin : g_cell
    // C1, normal direction, top to bottom
    bido_fa u_c1 (
      .m_bit   (m[N-1-r]),
      .q_bit   (q[r]),
      .sum_in  ((r == 0) ? 1'b0 : c1_sum[(r == 0) ? 0 : r-1]),
      .carry_in((r == N-1) ? 1'b0 : c1_cin[(r == N-1) ? 0 : r]),
      .sum     (c1_sum[r]),
      .carry   (c1_carry[r])
    );
    // C2, reverse direction, bottom to top (index = recomputation row)
    bido_fa u_c2 (
      .m_bit   (m_bar[N-1-r]),
      .q_bit   (q_bar[r]),
      .sum_in  ((r == 0) ? 1'b0 : c2_sum[(r == 0) ? 0 : r-1]),
      .carry_in((r == N-1) ? 1'b0 : c2_cin[(r == N-1) ? 0 : r]),
      .sum     (c2_sum[r]),
      .carry   (c2_carry[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_n <= '0;
      hold_r <= '0;
    end else if (hold) begin
      hold_n <= c1_carry;
      hold_r <= c2_carry;
    end
  end

  assign p_mid    = c1_sum[N-1];
  assign pbar_mid = c2_sum[N-1];

endmodule
