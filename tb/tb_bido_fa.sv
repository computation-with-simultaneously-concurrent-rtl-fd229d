// Self-checking testbench of bido_fa: all 16 input combinations against the
// arithmetic sum of the bit product and the two incoming bits.
module tb_bido_fa;
  logic m_bit, q_bit, sum_in, carry_in, sum, carry;
  int checks = 0, failures = 0;

  bido_fa dut (.*);

  initial begin
    for (int v = 0; v < 16; v++) begin
      int total;
      {m_bit, q_bit, sum_in, carry_in} = 4'(v);
      #1;
      total = int'(m_bit && q_bit) + int'(sum_in) + int'(carry_in);
      checks++;
      if ({carry, sum} != 2'(total)) begin
        failures++;
        $display("FAIL v=%0d got %b%b expected %0d", v, carry, sum, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
