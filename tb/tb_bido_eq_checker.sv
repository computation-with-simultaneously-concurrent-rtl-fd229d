// Self-checking testbench of bido_eq_checker: a difference in each single
// bit position, then equal words, words differing in one random bit, and
// random pairs.
module tb_bido_eq_checker;
  localparam int W = 32;
  logic [W-1:0] p, p_bar, diff;
  logic mismatch;
  int checks = 0, failures = 0;

  bido_eq_checker #(.W(W)) dut (.*);

  task automatic check(input logic exp_mm, input logic [W-1:0] exp_diff);
    #1;
    checks++;
    if (mismatch !== exp_mm || diff !== exp_diff) begin
      failures++;
      $display("FAIL p=%h p_bar=%h mismatch=%b diff=%h", p, p_bar, mismatch, diff);
    end
  endtask

  initial begin
    // every single-bit difference
    for (int b = 0; b < W; b++) begin
      p = $urandom; p_bar = p ^ (W'(1) << b);
      check(1'b1, W'(1) << b);
    end
    for (int i = 0; i < 100; i++) begin
      p = $urandom; p_bar = p;
      check(1'b0, '0);
      p_bar = p ^ (W'(1) << ($urandom % W));
      check(1'b1, p ^ p_bar);
      p_bar = $urandom;
      check(p != p_bar, p ^ p_bar);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
