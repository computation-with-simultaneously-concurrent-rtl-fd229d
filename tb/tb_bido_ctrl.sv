// Self-checking testbench of bido_ctrl: random start requests. A reference
// model of the phase sequence (IDLE -> T1 -> T2, T2 -> T1 on a start)
// predicts state and every control output each cycle; it also checks that
// a start in T1 is refused and that back-to-back operations take two
// cycles each.
module tb_bido_ctrl;
  import bido_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic ready, load, sw, hold, capture;
  state_e state, exp_state;
  int checks = 0, failures = 0, refused = 0, b2b = 0;

  bido_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    exp_state = ST_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      start = (i < 60) ? 1'b1 : 1'(($urandom % 3) != 0);
      #1;
      checks++;
      if (state !== exp_state
          || ready   !== (exp_state != ST_T1)
          || load    !== (start && exp_state != ST_T1)
          || sw      !== (exp_state == ST_T2)
          || hold    !== (exp_state == ST_T1)
          || capture !== (exp_state == ST_T2)) begin
        failures++;
        $display("FAIL cycle %0d state=%s exp=%s ready=%b load=%b sw=%b hold=%b cap=%b",
                 i, state.name(), exp_state.name(), ready, load, sw, hold, capture);
      end
      if (start && exp_state == ST_T1) refused++;
      if (start && exp_state == ST_T2) b2b++;
      unique case (exp_state)
        ST_IDLE: exp_state = start ? ST_T1 : ST_IDLE;
        ST_T1:   exp_state = ST_T2;
        default: exp_state = start ? ST_T1 : ST_IDLE;
      endcase
    end
    checks++;
    if (refused == 0 || b2b == 0) begin
      failures++;
      $display("FAIL refused=%0d back-to-back=%0d", refused, b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
