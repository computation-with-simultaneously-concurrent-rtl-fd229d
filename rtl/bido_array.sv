// BIDO array multiplier: N x N ripple-row array in which the normal
// computation and a recomputation of the same product run at the same time
// in opposite directions.
//
// Geometry. Physical cell (r, c) lies in row r (multiplier bit q[r] of the
// normal computation) and column j = r + c (weight 2^j of the normal
// product). Its normal bit pair is m[c], q[r]. The recomputation uses the
// same array rotated by 180 degrees: its row is N-1-r, its column
// 2N-2-j, and its bit pair is m_bar[N-1-c], q_bar[N-1-r]. Both copies of the
// operands carry the same values; they enter the array from opposite
// sides. Recomputed bit p_bar[k] therefore leaves the array at column
// 2N-2-k, mirror-imaged with respect to p[k].
//
// Parts. Columns 0..N-2 form M1, columns N..2N-2 form M2; their cells are
// bi-directional (bido_bfa). The middle column N-1 is the central part C
// (bido_central), built twice: C1 for the normal computation, C2 for the
// recomputation. In the normal direction a cell depends only on cells of
// lower or equal column, in the reverse direction only on cells of higher
// or equal column, so M1+C1 and M2+C2 can each finish a half-computation
// on their own.
//
// Operation, driven by sw (the one bi-switch control signal):
//   T1 (sw = 0): M1 runs the normal computation with C1 and produces
//       p[N-1:0]; M2 runs the recomputation with C2 and produces
//       p_bar[N-1:0]. hold = 1 makes C store the carries leaving C1 and C2
//       at the clock edge that ends T1.
//   T2 (sw = 1): the bi-switches turn. M2 continues the normal computation
//       from the carries held for C1 and produces p[2N-1:N]; M1 continues
//       the recomputation from the carries held for C2 and produces
//       p_bar[2N-1:N].
// The outputs are combinational; p_lo/pbar_lo are valid during T1 and
// p_hi/pbar_hi during T2, each after one half of the array delay.
//
// The partition into M1, C1/C2 and M2, the opposite data flows, the hold
// in the central part and the single switch control follow the BIDO
// method; the ripple-row array type and one clock cycle per
// half-computation are this design's choices.
//
// Every M cell drives its neighbours on both sides and takes its inputs
// from one side through its bi-switch. The resulting paths from a cell to
// its neighbour and back are structural only: all cells of one part share
// one switch setting, so no signal ever returns to its source. Tools that
// report them as combinational loops are reporting these false paths.
module bido_array
  import bido_pkg::*;
#(
  parameter int unsigned N = 16  // operand width
) (
  input  logic         clk,
  input  logic         rst_n,    // asynchronous, active low
  input  logic         sw,       // bi-switch control: 0 = T1, 1 = T2
  input  logic         hold,     // end of T1: capture the crossing carries
  input  logic [N-1:0] m,        // multiplicand, normal copy
  input  logic [N-1:0] q,        // multiplier, normal copy
  input  logic [N-1:0] m_bar,    // multiplicand, recomputation copy
  input  logic [N-1:0] q_bar,    // multiplier, recomputation copy
  output logic [N-1:0] p_lo,     // p[N-1:0], valid in T1
  output logic [N-1:0] p_hi,     // p[2N-1:N], valid in T2
  output logic [N-1:0] pbar_lo,  // p_bar[N-1:0], valid in T1
  output logic [N-1:0] pbar_hi   // p_bar[2N-1:N], valid in T2
);

  // sum/carry of the M cells, indexed [r][c]; entries on column N-1 belong
  // to the central part and are unused here
  logic s_q [N][N];
  logic c_q [N][N];

  logic [N-1:0] hold_n, hold_r;
  logic [N-2:0] c1_cin, c2_cin;
  logic         p_mid, pbar_mid;

  dir_e dir_m1, dir_m2;
  assign dir_m1 = sw ? DIR_REVERSE : DIR_NORMAL;
  assign dir_m2 = sw ? DIR_NORMAL  : DIR_REVERSE;

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam int J = r + c;  // column of this cell
      if (J < N-1) begin : g_m1
        logic sin_n, cin_n, sin_r, cin_r;
        // normal direction: sum from the row above, carry from column J-1
        assign sin_n = (r == 0) ? 1'b0 : s_q[(r == 0) ? 0 : r-1][c+1];
        assign cin_n = (c == 0) ? 1'b0 : c_q[r][(c == 0) ? 0 : c-1];
        // reverse direction: sum from the row below (at c = 0 it is the
        // end-of-row carry of that row), carry from column J+1
        if (c == 0) begin : g_rs_end
          if (r + 1 == N-1) begin : g_c2
            assign sin_r = hold_r[0];
          end else begin : g_m1
            assign sin_r = c_q[r+1][0];
          end
        end else begin : g_rs_mid
          assign sin_r = s_q[r+1][c-1];
        end
        if (J + 1 == N-1) begin : g_rc_c2
          assign cin_r = hold_r[N-1-r];
        end else begin : g_rc_m1
          assign cin_r = c_q[r][c+1];
        end
        bido_bfa u_bfa (
          .dir       (dir_m1),
          .m_n       (m[c]),
          .q_n       (q[r]),
          .sum_in_n  (sin_n),
          .carry_in_n(cin_n),
          .m_r       (m_bar[N-1-c]),
          .q_r       (q_bar[N-1-r]),
          .sum_in_r  (sin_r),
          .carry_in_r(cin_r),
          .sum       (s_q[r][c]),
          .carry     (c_q[r][c])
        );
      end else if (J > N-1) begin : g_m2
        logic sin_n, cin_n, sin_r, cin_r;
        // normal direction (r >= 1 and c >= 1 hold in M2)
        if (c == N-1) begin : g_ns_end
          if (r == 1) begin : g_c1
            assign sin_n = hold_n[0];
          end else begin : g_m2
            assign sin_n = c_q[r-1][N-1];
          end
        end else begin : g_ns_mid
          assign sin_n = s_q[r-1][c+1];
        end
        if (J - 1 == N-1) begin : g_nc_c1
          assign cin_n = hold_n[r];
        end else begin : g_nc_m2
          assign cin_n = c_q[r][c-1];
        end
        // reverse direction (c >= 1 holds in M2)
        assign sin_r = (r == N-1) ? 1'b0 : s_q[(r == N-1) ? r : r+1][c-1];
        assign cin_r = (c == N-1) ? 1'b0 : c_q[r][(c == N-1) ? c : c+1];
        bido_bfa u_bfa (
          .dir       (dir_m2),
          .m_n       (m[c]),
          .q_n       (q[r]),
          .sum_in_n  (sin_n),
          .carry_in_n(cin_n),
          .m_r       (m_bar[N-1-c]),
          .q_r       (q_bar[N-1-r]),
          .sum_in_r  (sin_r),
          .carry_in_r(cin_r),
          .sum       (s_q[r][c]),
          .carry     (c_q[r][c])
        );
      end else begin : g_c
        // column N-1 is built in bido_central
        assign s_q[r][c] = 1'b0;
        assign c_q[r][c] = 1'b0;
      end
    end
  end

  // carries entering the central columns: into C1 row r from M1 cell
  // (r, N-2-r); into C2 recomputation row k from M2 cell (N-1-k, k+1)
  for (genvar k = 0; k < N-1; k++) begin : g_cin
    assign c1_cin[k] = c_q[k][N-2-k];
    assign c2_cin[k] = c_q[N-1-k][k+1];
  end

  bido_central #(.N(N)) u_central (
    .clk     (clk),
    .rst_n   (rst_n),
    .hold    (hold),
    .m       (m),
    .q       (q),
    .m_bar   (m_bar),
    .q_bar   (q_bar),
    .c1_cin  (c1_cin),
    .c2_cin  (c2_cin),
    .hold_n  (hold_n),
    .hold_r  (hold_r),
    .p_mid   (p_mid),
    .pbar_mid(pbar_mid)
  );

  // product bits: p[r] leaves at the right end of row r, p[N-1+c] at the
  // bottom row, p[2N-1] is the end-of-row carry of the bottom row; the
  // recomputed bits leave at the mirror-image places
  for (genvar k = 0; k < N; k++) begin : g_out
    if (k < N-1) begin : g_lo
      assign p_lo[k]    = s_q[k][0];
      assign pbar_lo[k] = s_q[N-1-k][N-1];
      assign p_hi[k]    = s_q[N-1][k+1];
      assign pbar_hi[k] = s_q[0][N-2-k];
    end else begin : g_top
      assign p_lo[k]    = p_mid;
      assign pbar_lo[k] = pbar_mid;
      assign p_hi[k]    = c_q[N-1][N-1];
      assign pbar_hi[k] = c_q[0][0];
    end
  end

endmodule
