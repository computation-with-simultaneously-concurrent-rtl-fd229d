// Self-checking testbench of bido_central (N = 16): random operands and
// incoming carries. The middle product bits are checked combinationally,
// the held carries after a clock edge with hold = 1, and that they keep
// their value through an edge with hold = 0. The reference walks down
// each column bit by bit.
module tb_bido_central;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, hold = 0;
  logic [N-1:0] m, q, m_bar, q_bar, hold_n, hold_r;
  logic [N-2:0] c1_cin, c2_cin;
  logic p_mid, pbar_mid;
  int checks = 0, failures = 0;

  bido_central #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // one column: returns the final sum, carries per cell in cy
  function automatic logic column(input logic [N-1:0] a, input logic [N-1:0] b,
                                  input logic [N-2:0] cin, output logic [N-1:0] cy);
    logic s = 1'b0;
    for (int r = 0; r < N; r++) begin
      int t = int'(a[N-1-r] & b[r]) + int'(s) + ((r == N-1) ? 0 : int'(cin[r]));
      s     = t[0];
      cy[r] = t[1];
    end
    return s;
  endfunction

  initial begin
    logic [N-1:0] cy1, cy2, old_n, old_r;
    logic s1, s2;
    m = '0; q = '0; m_bar = '0; q_bar = '0; c1_cin = '0; c2_cin = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      m = N'($urandom); q = N'($urandom); m_bar = N'($urandom); q_bar = N'($urandom);
      c1_cin = (N-1)'($urandom); c2_cin = (N-1)'($urandom);
      hold = (i % 3 != 2);
      old_n = hold_n; old_r = hold_r;
      #1;
      s1 = column(m, q, c1_cin, cy1);
      s2 = column(m_bar, q_bar, c2_cin, cy2);
      checks++;
      if (p_mid !== s1 || pbar_mid !== s2) begin
        failures++;
        $display("FAIL mid bits %b%b expected %b%b", p_mid, pbar_mid, s1, s2);
      end
      @(posedge clk); #1;
      checks++;
      if (hold ? (hold_n !== cy1 || hold_r !== cy2) : (hold_n !== old_n || hold_r !== old_r)) begin
        failures++;
        $display("FAIL hold=%b hold_n=%h hold_r=%h expected %h %h", hold, hold_n, hold_r,
                 hold ? cy1 : old_n, hold ? cy2 : old_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
