// Multiple-fault test of bido_multiplier at N = 4.
//
// Part 1, faults confined to one side: every pair of cells inside M1 and
// every pair inside M2 is made faulty at once, in four ways (both sums
// stuck at 1, both at 0, one sum at 1 and the other at 0, both carries
// stuck at 1), and all 256 operand pairs are multiplied. Any wrong normal
// or recomputed product must come with error = 1.
// Part 2, mirror-image faults: an M1 cell and the M2 cell at the mirror
// position (row N-1-r, index N-1-c) get the same stuck-at-1 sum. The
// recomputation then meets exactly the fault the normal computation meets,
// so both products must come out identical (and error low) even when
// wrong: this is the blind spot of the method for symmetric faults. The
// test checks P == P_bar for every operand pair and that at least one
// pair gives a wrong, undetected product.
module tb_bido_multi_fault;
  import bido_pkg::*;
  localparam int N = 4;
  localparam int NID = N*N*N*N*4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] m = '0, q = '0;
  logic ready, valid, error;
  logic [2*N-1:0] product, product_bar;
  state_e phase;
  int checks = 0, failures = 0, turn = -1, done = -1;
  int n_pairs = 0, n_detect = 0, n_hidden = 0, n_mirror = 0;
  bit mirror_mode = 0;

  bido_multiplier #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit side_pair(input int id);
    int k = id / 4;
    int c2 = k % N, r2 = (k / N) % N, c1 = (k / (N*N)) % N, r1 = k / (N*N*N);
    bit both_m1 = (r1 + c1 < N-1) && (r2 + c2 < N-1);
    bit both_m2 = (r1 + c1 > N-1) && (r2 + c2 > N-1);
    return (both_m1 || both_m2) && (r1 * N + c1 < r2 * N + c2);
  endfunction

  task automatic run_all();
    for (int v = 0; v < (1 << (2*N)); v++) begin
      logic [2*N-1:0] e;
      @(negedge clk);
      m = N'(v >> N); q = N'(v);
      e = (2*N)'(m) * (2*N)'(q);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!valid) @(negedge clk);
      checks++;
      if (!mirror_mode) begin
        if ((product !== e || product_bar !== e) && !error) begin
          failures++;
          $display("FAIL pair %0d undetected: %0d*%0d P=%0d Pbar=%0d", turn, m, q,
                   product, product_bar);
        end
        if (error) n_detect++;
      end else begin
        if (product !== product_bar || error) begin
          failures++;
          $display("FAIL mirror pair %0d: P=%0d Pbar=%0d error=%b", turn, product,
                   product_bar, error);
        end
        if (product !== e) n_hidden++;
      end
    end
  endtask

  for (genvar r1 = 0; r1 < N; r1++) begin : g_r1
    for (genvar c1 = 0; c1 < N; c1++) begin : g_c1
      for (genvar r2 = 0; r2 < N; r2++) begin : g_r2
        for (genvar c2 = 0; c2 < N; c2++) begin : g_c2
          localparam int ID = (((r1 * N + c1) * N + r2) * N + c2) * 4;
          if (r1 + c1 < N-1 && r2 + c2 < N-1 && r1 * N + c1 < r2 * N + c2) begin : g_m1
            initial for (int k = 0; k < 4; k++) begin
              wait (turn == ID + k);
              case (k)
                0: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m1.u_bfa.u_fa.sum = 1'b1;
                  force dut.u_array.g_row[r2].g_col[c2].g_m1.u_bfa.u_fa.sum = 1'b1;
                end
                1: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m1.u_bfa.u_fa.sum = 1'b0;
                  force dut.u_array.g_row[r2].g_col[c2].g_m1.u_bfa.u_fa.sum = 1'b0;
                end
                2: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m1.u_bfa.u_fa.sum = 1'b1;
                  force dut.u_array.g_row[r2].g_col[c2].g_m1.u_bfa.u_fa.sum = 1'b0;
                end
                default: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m1.u_bfa.u_fa.carry = 1'b1;
                  force dut.u_array.g_row[r2].g_col[c2].g_m1.u_bfa.u_fa.carry = 1'b1;
                end
              endcase
              run_all();
              release dut.u_array.g_row[r1].g_col[c1].g_m1.u_bfa.u_fa.sum;
              release dut.u_array.g_row[r2].g_col[c2].g_m1.u_bfa.u_fa.sum;
              release dut.u_array.g_row[r1].g_col[c1].g_m1.u_bfa.u_fa.carry;
              release dut.u_array.g_row[r2].g_col[c2].g_m1.u_bfa.u_fa.carry;
              done = ID + k;
            end
          end else if (r1 + c1 > N-1 && r2 + c2 > N-1 && r1 * N + c1 < r2 * N + c2) begin : g_m2
            initial for (int k = 0; k < 4; k++) begin
              wait (turn == ID + k);
              case (k)
                0: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m2.u_bfa.u_fa.sum = 1'b1;
                  force dut.u_array.g_row[r2].g_col[c2].g_m2.u_bfa.u_fa.sum = 1'b1;
                end
                1: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m2.u_bfa.u_fa.sum = 1'b0;
                  force dut.u_array.g_row[r2].g_col[c2].g_m2.u_bfa.u_fa.sum = 1'b0;
                end
                2: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m2.u_bfa.u_fa.sum = 1'b1;
                  force dut.u_array.g_row[r2].g_col[c2].g_m2.u_bfa.u_fa.sum = 1'b0;
                end
                default: begin
                  force dut.u_array.g_row[r1].g_col[c1].g_m2.u_bfa.u_fa.carry = 1'b1;
                  force dut.u_array.g_row[r2].g_col[c2].g_m2.u_bfa.u_fa.carry = 1'b1;
                end
              endcase
              run_all();
              release dut.u_array.g_row[r1].g_col[c1].g_m2.u_bfa.u_fa.sum;
              release dut.u_array.g_row[r2].g_col[c2].g_m2.u_bfa.u_fa.sum;
              release dut.u_array.g_row[r1].g_col[c1].g_m2.u_bfa.u_fa.carry;
              release dut.u_array.g_row[r2].g_col[c2].g_m2.u_bfa.u_fa.carry;
              done = ID + k;
            end
          end
        end
      end
    end
    // mirror-image pair: M1 cell (r1, c) with M2 cell (N-1-r1, N-1-c)
    for (genvar c = 0; c < N; c++) begin : g_mirror
      if (r1 + c < N-1) begin : g_m
        initial begin
          wait (turn == NID + r1 * N + c);
          force dut.u_array.g_row[r1].g_col[c].g_m1.u_bfa.u_fa.sum = 1'b1;
          force dut.u_array.g_row[N-1-r1].g_col[N-1-c].g_m2.u_bfa.u_fa.sum = 1'b1;
          run_all();
          release dut.u_array.g_row[r1].g_col[c].g_m1.u_bfa.u_fa.sum;
          release dut.u_array.g_row[N-1-r1].g_col[N-1-c].g_m2.u_bfa.u_fa.sum;
          n_mirror++;
          done = NID + r1 * N + c;
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NID; t++) begin
      if (side_pair(t)) begin
        turn = t;
        wait (done == t);
        if (t % 4 == 0) n_pairs++;
      end
    end
    mirror_mode = 1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N - 1 - r; c++) begin
        turn = NID + r * N + c;
        wait (done == NID + r * N + c);
      end
    $display("cell pairs within one side: %0d, detected results %0d", n_pairs, n_detect);
    $display("mirror-image pairs: %0d, wrong but undetectable results %0d", n_mirror, n_hidden);
    checks++;
    if (n_pairs == 0 || n_detect == 0 || n_mirror == 0 || n_hidden == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
