// Self-checking testbench of bido_bfa: all 512 combinations of the
// direction and the eight data inputs. The expected sum and carry are the
// full-adder result of the input set the direction selects; the other set
// must have no influence.
module tb_bido_bfa;
  import bido_pkg::*;
  dir_e dir;
  logic m_n, q_n, sum_in_n, carry_in_n, m_r, q_r, sum_in_r, carry_in_r;
  logic sum, carry;
  int checks = 0, failures = 0;

  bido_bfa dut (.*);

  initial begin
    for (int v = 0; v < 512; v++) begin
      int total;
      logic d;
      {d, m_n, q_n, sum_in_n, carry_in_n, m_r, q_r, sum_in_r, carry_in_r} = 9'(v);
      dir = d ? DIR_REVERSE : DIR_NORMAL;
      #1;
      if (d) total = int'(m_r && q_r) + int'(sum_in_r) + int'(carry_in_r);
      else   total = int'(m_n && q_n) + int'(sum_in_n) + int'(carry_in_n);
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
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
