// End-to-end testbench of bido_multiplier at its default size (N = 16).
//
// Part 1, fault-free: random operands with random gaps between requests,
// back-to-back requests and requests refused while the first
// half-computation runs. A scoreboard checks every result against m * q
// (normal and recomputed product, error low), the latency (valid three
// clock edges after the accepting edge) and that back-to-back results come
// two cycles apart.
// Part 2, faulty cells: one cell at a time is forced stuck at 0 or 1 (in
// M1 at column 1 as in the worked example, in the central column C1 and
// C2, and in M2). For every multiplication a wrong normal or recomputed
// product must come with error = 1, and every fault must be detected at
// least once. A temporary fault, active only while the switches are in
// the T2 setting, must be detected the same way.
// Mechanisms counted, each must occur: T1 phase, T2 phase (bi-switches
// turned), back-to-back start, refused start, detected error, temporary
// fault cycle.
module tb_bido_multiplier;
  import bido_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] m = '0, q = '0;
  logic ready, valid, error;
  logic [2*N-1:0] product, product_bar;
  state_e phase;

  int checks = 0, failures = 0;
  int n_t1 = 0, n_t2 = 0, n_b2b = 0, n_refused = 0, n_detect = 0;
  longint cycle = 0;

  bido_multiplier dut (.*);

  always #5 clk = ~clk;

  // scoreboard
  logic [2*N-1:0] exp_q[$];
  longint         acc_q[$];
  longint         last_valid = -100;
  bit             last_b2b = 0, b2b_q[$];
  bit             faulty = 0;
  int             fault_detect = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (phase == ST_T1) n_t1++;
      if (phase == ST_T2) n_t2++;
      if (start && !ready) n_refused++;
      if (start && ready) begin
        exp_q.push_back((2*N)'(m) * (2*N)'(q));
        acc_q.push_back(cycle);
        b2b_q.push_back(phase == ST_T2);
        if (phase == ST_T2) n_b2b++;
      end
      if (valid) begin
        logic [2*N-1:0] e;
        longint a;
        bit bb;
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        bb = b2b_q.pop_front();
        checks++;
        if (cycle - a != 3) begin
          failures++;
          $display("FAIL latency %0d cycles", cycle - a);
        end
        if (bb) begin
          checks++;
          if (cycle - last_valid != 2) begin
            failures++;
            $display("FAIL back-to-back results %0d cycles apart", cycle - last_valid);
          end
        end
        last_valid = cycle;
        checks++;
        if (!faulty) begin
          if (product !== e || product_bar !== e || error !== 1'b0) begin
            failures++;
            $display("FAIL expected %h got P=%h Pbar=%h error=%b", e, product, product_bar, error);
          end
        end else begin
          if (error) begin
            n_detect++;
            fault_detect++;
          end
          if ((product !== e || product_bar !== e) && !error) begin
            failures++;
            $display("FAIL undetected fault: expected %h P=%h Pbar=%h", e, product, product_bar);
          end
        end
      end
    end
  end

  bit transient = 0;
  int n_transient = 0;
  always @(negedge clk) begin
    if (transient && phase == ST_T2) begin
      force dut.u_array.g_row[0].g_col[4].g_m1.u_bfa.u_fa.sum = 1'b1;
      n_transient++;
    end else if (transient) begin
      release dut.u_array.g_row[0].g_col[4].g_m1.u_bfa.u_fa.sum;
    end
  end

  task automatic request(input int gap);
    @(negedge clk);
    m = N'($urandom); q = N'($urandom);
    if ($urandom % 8 == 0) m = '1;
    if ($urandom % 8 == 0) q = '1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic burst(input int count);
    for (int i = 0; i < count; i++) begin
      // gap 0: the next request lands in T1 and is refused once, then
      // accepted in T2 (back-to-back); other gaps leave the unit idle
      if (i % 4 == 0) begin
        @(negedge clk);
        m = N'($urandom); q = N'($urandom); start = 1'b1;
        do @(negedge clk); while (!ready);
        @(negedge clk);
        start = 1'b0;
      end else begin
        request(int'($urandom % 3));
      end
    end
    repeat (6) @(negedge clk);
  endtask

  task automatic fault_phase(input string name);
    checks++;
    if (fault_detect == 0) begin
      failures++;
      $display("FAIL fault %s never detected", name);
    end
    $display("fault %s: detected in %0d of the multiplications", name, fault_detect);
    fault_detect = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    burst(400);

    faulty = 1;
    force dut.u_array.g_row[1].g_col[0].g_m1.u_bfa.u_fa.sum = 1'b1;
    burst(60);
    release dut.u_array.g_row[1].g_col[0].g_m1.u_bfa.u_fa.sum;
    fault_phase("M1 column 1 sum stuck-at-1");

    force dut.u_array.g_row[2].g_col[3].g_m1.u_bfa.u_fa.carry = 1'b0;
    burst(60);
    release dut.u_array.g_row[2].g_col[3].g_m1.u_bfa.u_fa.carry;
    fault_phase("M1 column 5 carry stuck-at-0");

    force dut.u_array.u_central.g_cell[6].u_c1.sum = 1'b0;
    burst(60);
    release dut.u_array.u_central.g_cell[6].u_c1.sum;
    fault_phase("C1 row 6 sum stuck-at-0");

    force dut.u_array.u_central.g_cell[9].u_c2.carry = 1'b1;
    burst(60);
    release dut.u_array.u_central.g_cell[9].u_c2.carry;
    fault_phase("C2 row 9 carry stuck-at-1");

    force dut.u_array.g_row[12].g_col[10].g_m2.u_bfa.u_fa.sum = 1'b1;
    burst(60);
    release dut.u_array.g_row[12].g_col[10].g_m2.u_bfa.u_fa.sum;
    fault_phase("M2 column 22 sum stuck-at-1");

    // temporary fault: an M1 cell misbehaves only while the switches are
    // in the T2 setting, i.e. only for the recomputation
    transient = 1;
    burst(60);
    transient = 0;
    @(negedge clk);
    release dut.u_array.g_row[0].g_col[4].g_m1.u_bfa.u_fa.sum;
    fault_phase("M1 column 4 sum stuck-at-1 during T2 only");

    faulty = 0;
    burst(20);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("mechanisms: T1=%0d T2=%0d back-to-back=%0d refused=%0d detected=%0d temporary=%0d",
             n_t1, n_t2, n_b2b, n_refused, n_detect, n_transient);
    checks++;
    if (n_t1 == 0 || n_t2 == 0 || n_b2b == 0 || n_refused == 0 || n_detect == 0 ||
        n_transient == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
