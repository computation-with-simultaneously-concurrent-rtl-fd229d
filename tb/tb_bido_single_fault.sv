// Single-faulty-cell detection test of bido_multiplier at N = 4.
//
// Claim under test: any error caused by one faulty cell is detected. Every
// cell of M1, C1, C2 and M2 is made faulty in turn, its sum or carry
// output forced stuck at 0 or at 1 (80 faults in all), and for each fault
// all 256 operand pairs are multiplied. N may be changed; the fault list
// and the operand sweep follow it. Whenever the normal or the
// recomputed product is wrong, error must be 1, and error must never be 1
// when both are right. Faults that never change a result (for example a
// carry that is always 0) are counted separately. A fault-free pass over
// all pairs comes first. For the faulty cell of the worked example (row 1,
// column 1) the size of every error is checked too: +-2, +-4 or +-6 in
// the normal product, +-2^(2N-3), +-2^(2N-2) or +-3*2^(2N-3) (32, 64, 96 at
// N = 4) in the recomputed one.
module tb_bido_single_fault;
  import bido_pkg::*;
  localparam int N = 4;
  localparam int NFAULT = N*N*4 + N*4;  // 4 faults per cell, C2 included
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] m = '0, q = '0;
  logic ready, valid, error;
  logic [2*N-1:0] product, product_bar;
  state_e phase;
  int checks = 0, failures = 0, turn = -1;
  int n_effective = 0, n_silent_faults = 0, n_detect = 0, n_col1_n = 0, n_col1_r = 0;

  bido_multiplier #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // multiply all operand pairs; returns how many results were wrong
  task automatic run_all(output int wrong);
    wrong = 0;
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
      // the cell in row 1 at column 1 (worked example): its errors must
      // have the weights 2^1 and 2^2 in the normal product and 2^(2N-3)
      // and 2^(2N-2) in the recomputed one
      if (turn >= 0 && turn / 4 == N) begin
        longint dn = longint'(product) - longint'(e);
        longint dr = longint'(product_bar) - longint'(e);
        longint w  = longint'(1) << (2*N - 3);
        checks++;
        if (!(dn inside {0, 2, -2, 4, -4, 6, -6}) ||
            !(dr inside {0, w, -w, 2*w, -2*w, 3*w, -3*w})) begin
          failures++;
          $display("FAIL column-1 fault %0d: error %0d / %0d outside the expected sets",
                   turn, dn, dr);
        end
        if (dn != 0) n_col1_n++;
        if (dr != 0) n_col1_r++;
      end
      if (product !== e || product_bar !== e) begin
        wrong++;
        if (!error) begin
          failures++;
          $display("FAIL fault %0d undetected: %0d*%0d P=%0d Pbar=%0d", turn, m, q,
                   product, product_bar);
        end else n_detect++;
      end else if (error) begin
        failures++;
        $display("FAIL fault %0d: false alarm on %0d*%0d", turn, m, q);
      end
    end
  endtask

  task automatic finish_fault(input int wrong);
    if (wrong > 0) n_effective++;
    else n_silent_faults++;
    turn++;
  endtask

  for (genvar r = 0; r < N; r++) begin : g_r
    for (genvar c = 0; c < N; c++) begin : g_c
      localparam int ID = (r * N + c) * 4;
      if (r + c < N-1) begin : g_m1
        initial for (int k = 0; k < 4; k++) begin
          int wrong;
          wait (turn == ID + k);
          case (k)
            0: force dut.u_array.g_row[r].g_col[c].g_m1.u_bfa.u_fa.sum = 1'b0;
            1: force dut.u_array.g_row[r].g_col[c].g_m1.u_bfa.u_fa.sum = 1'b1;
            2: force dut.u_array.g_row[r].g_col[c].g_m1.u_bfa.u_fa.carry = 1'b0;
            default: force dut.u_array.g_row[r].g_col[c].g_m1.u_bfa.u_fa.carry = 1'b1;
          endcase
          run_all(wrong);
          release dut.u_array.g_row[r].g_col[c].g_m1.u_bfa.u_fa.sum;
          release dut.u_array.g_row[r].g_col[c].g_m1.u_bfa.u_fa.carry;
          finish_fault(wrong);
        end
      end else if (r + c > N-1) begin : g_m2
        initial for (int k = 0; k < 4; k++) begin
          int wrong;
          wait (turn == ID + k);
          case (k)
            0: force dut.u_array.g_row[r].g_col[c].g_m2.u_bfa.u_fa.sum = 1'b0;
            1: force dut.u_array.g_row[r].g_col[c].g_m2.u_bfa.u_fa.sum = 1'b1;
            2: force dut.u_array.g_row[r].g_col[c].g_m2.u_bfa.u_fa.carry = 1'b0;
            default: force dut.u_array.g_row[r].g_col[c].g_m2.u_bfa.u_fa.carry = 1'b1;
          endcase
          run_all(wrong);
          release dut.u_array.g_row[r].g_col[c].g_m2.u_bfa.u_fa.sum;
          release dut.u_array.g_row[r].g_col[c].g_m2.u_bfa.u_fa.carry;
          finish_fault(wrong);
        end
      end else begin : g_c1
        // the C1 cell of row r
        initial for (int k = 0; k < 4; k++) begin
          int wrong;
          wait (turn == ID + k);
          case (k)
            0: force dut.u_array.u_central.g_cell[r].u_c1.sum = 1'b0;
            1: force dut.u_array.u_central.g_cell[r].u_c1.sum = 1'b1;
            2: force dut.u_array.u_central.g_cell[r].u_c1.carry = 1'b0;
            default: force dut.u_array.u_central.g_cell[r].u_c1.carry = 1'b1;
          endcase
          run_all(wrong);
          release dut.u_array.u_central.g_cell[r].u_c1.sum;
          release dut.u_array.u_central.g_cell[r].u_c1.carry;
          finish_fault(wrong);
        end
      end
    end
    // the C2 cell of recomputation row r
    initial for (int k = 0; k < 4; k++) begin
      int wrong;
      wait (turn == N*N*4 + r*4 + k);
      case (k)
        0: force dut.u_array.u_central.g_cell[r].u_c2.sum = 1'b0;
        1: force dut.u_array.u_central.g_cell[r].u_c2.sum = 1'b1;
        2: force dut.u_array.u_central.g_cell[r].u_c2.carry = 1'b0;
        default: force dut.u_array.u_central.g_cell[r].u_c2.carry = 1'b1;
      endcase
      run_all(wrong);
      release dut.u_array.u_central.g_cell[r].u_c2.sum;
      release dut.u_array.u_central.g_cell[r].u_c2.carry;
      finish_fault(wrong);
    end
  end

  initial begin
    int wrong;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_all(wrong);
    checks++;
    if (wrong != 0) begin
      failures++;
      $display("FAIL fault-free run gave %0d wrong results", wrong);
    end
    turn = 0;
    wait (turn == NFAULT);
    $display("faults with effect: %0d (detected results %0d), faults without effect: %0d",
             n_effective, n_detect, n_silent_faults);
    $display("column-1 cell: %0d normal and %0d recomputed results off by the expected weights",
             n_col1_n, n_col1_r);
    checks++;
    if (n_effective == 0 || n_col1_n == 0 || n_col1_r == 0) begin
      failures++;
      $display("FAIL no fault had an effect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NFAULT + 1) * (1 << (2*N)) * 6) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
