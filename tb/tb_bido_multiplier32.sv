// 32-bit configuration of bido_multiplier (N = 32): random and corner
// operands, one request every two cycles, every result checked against
// m * q with error low; then the same with one M1 cell near the middle
// column stuck at 1, where every wrong result must raise error and the
// fault must be detected at least once.
module tb_bido_multiplier32;
  import bido_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] m = '0, q = '0;
  logic ready, valid, error;
  logic [2*N-1:0] product, product_bar;
  state_e phase;
  int checks = 0, failures = 0, n_detect = 0;
  bit faulty = 0;
  logic [2*N-1:0] exp_q[$];

  bido_multiplier #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (start && ready) exp_q.push_back((2*N)'(m) * (2*N)'(q));
    if (valid) begin
      logic [2*N-1:0] e;
      e = exp_q.pop_front();
      checks++;
      if (!faulty && (product !== e || product_bar !== e || error)) begin
        failures++;
        $display("FAIL expected %h P=%h Pbar=%h error=%b", e, product, product_bar, error);
      end
      if (faulty && (product !== e || product_bar !== e) && !error) begin
        failures++;
        $display("FAIL undetected fault: expected %h P=%h Pbar=%h", e, product, product_bar);
      end
      if (faulty && error) n_detect++;
    end
  end

  task automatic stream(input int count);
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      m = N'($urandom); q = N'($urandom);
      case ($urandom % 6)
        0: m = '1;
        1: q = '1;
        2: begin m = '1; q = '1; end
        default: ;
      endcase
      start = 1'b1;
    end
    @(negedge clk);
    start = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    stream(1000);
    faulty = 1;
    force dut.u_array.g_row[10].g_col[15].g_m1.u_bfa.u_fa.sum = 1'b1;
    stream(200);
    release dut.u_array.g_row[10].g_col[15].g_m1.u_bfa.u_fa.sum;
    faulty = 0;
    checks++;
    if (n_detect == 0 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL detected=%0d missing=%0d", n_detect, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
