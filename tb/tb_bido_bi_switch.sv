// Self-checking testbench of bido_bi_switch: random bundles on both sides,
// both switch settings, output must equal the selected side.
module tb_bido_bi_switch;
  import bido_pkg::*;
  localparam int W = 4;
  dir_e dir;
  logic [W-1:0] from_norm, from_rev, to_cell;
  int checks = 0, failures = 0;

  bido_bi_switch #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < 200; i++) begin
      from_norm = W'($urandom);
      from_rev  = W'($urandom);
      dir       = (i % 2 == 0) ? DIR_NORMAL : DIR_REVERSE;
      #1;
      checks++;
      if (to_cell != ((i % 2 == 0) ? from_norm : from_rev)) begin
        failures++;
        $display("FAIL dir=%0d norm=%h rev=%h out=%h", dir, from_norm, from_rev, to_cell);
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
