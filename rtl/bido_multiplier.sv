// BIDO multiplier: an N x N unsigned array multiplier with concurrent error
// detection by bi-directional operands.
//
// In an array multiplier the cells far from the least significant corner
// idle during the first part of a multiplication, and the cells near it
// idle during the second part. This design uses that idle time for a
// complete recomputation: a second copy of the operands enters the array
// from the opposite corner and flows the other way, so each half of the
// array serves the normal computation in one half-cycle and the
// recomputation in the other. Only the middle column is duplicated. Both
// products are ready after about the time of one ordinary multiplication
// and are compared; because the two computations use different cells for
// each bit weight, a faulty cell disturbs them with errors of different
// weights and the comparison flags it.
//
// Blocks: bido_ctrl (phases and bi-switch control), two operand registers
// (one copy per direction), bido_array (M1, central part C, M2),
// registers for the low result halves, bido_eq_checker and the result
// registers.
//
// Interface and timing: present m, q with start. When ready is 1 the
// operands are taken at that clock edge. Two cycles later (edge 2) product,
// product_bar and error are registered and valid is 1 for one cycle after
// that edge. A new start may be given every second cycle. error = 1 means
// the normal and the recomputed products differ. Reset is asynchronous and
// active low. Unsigned operands, as in the array of the description; the
// register placement and the two-cycle split are this design's choice.
// Lint and synthesis tools report combinational loops inside bido_array:
// they run through the bi-switches of neighbouring cells and are never
// active, because each part of the array has one switch setting at a time
// (see bido_array).
module bido_multiplier
  import bido_pkg::*;
#(
  parameter int unsigned N = 16  // operand width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   m,            // multiplicand
  input  logic [N-1:0]   q,            // multiplier
  output logic           ready,        // start is accepted this cycle
  output logic           valid,        // results below are new
  output logic [2*N-1:0] product,      // normal computation
  output logic [2*N-1:0] product_bar,  // recomputation
  output logic           error,        // the two disagree
  output state_e         phase         // T1/T2 phase, for observation
);

  logic load, sw, hold, capture;

  logic [N-1:0] m_n_q, q_n_q, m_r_q, q_r_q;
  logic [N-1:0] p_lo, p_hi, pbar_lo, pbar_hi;
  logic [N-1:0] p_lo_q, pbar_lo_q;
  logic [2*N-1:0] p_full, pbar_full;
  logic mismatch;

  bido_ctrl u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .ready  (ready),
    .load   (load),
    .sw     (sw),
    .hold   (hold),
    .capture(capture),
    .state  (phase)
  );

  // operands, one register per direction so that the two computations do
  // not share an operand wire
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_n_q <= '0;
      q_n_q <= '0;
      m_r_q <= '0;
      q_r_q <= '0;
    end else if (load) begin
      m_n_q <= m;
      q_n_q <= q;
      m_r_q <= m;
      q_r_q <= q;
    end
  end

  bido_array #(.N(N)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .sw     (sw),
    .hold   (hold),
    .m      (m_n_q),
    .q      (q_n_q),
    .m_bar  (m_r_q),
    .q_bar  (q_r_q),
    .p_lo   (p_lo),
    .p_hi   (p_hi),
    .pbar_lo(pbar_lo),
    .pbar_hi(pbar_hi)
  );

  // low halves leave the array in T1 and are kept for T2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_lo_q    <= '0;
      pbar_lo_q <= '0;
    end else if (hold) begin
      p_lo_q    <= p_lo;
      pbar_lo_q <= pbar_lo;
    end
  end

  assign p_full    = {p_hi, p_lo_q};
  assign pbar_full = {pbar_hi, pbar_lo_q};

  bido_eq_checker #(.W(2*N)) u_check (
    .p       (p_full),
    .p_bar   (pbar_full),
    .diff    (),
    .mismatch(mismatch)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid       <= 1'b0;
      product     <= '0;
      product_bar <= '0;
      error       <= 1'b0;
    end else begin
      valid <= capture;
      if (capture) begin
        product     <= p_full;
        product_bar <= pbar_full;
        error       <= mismatch;
      end
    end
  end

endmodule
