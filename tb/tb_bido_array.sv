// Self-checking testbench of bido_array. A 4-bit array (the size of the
// worked example) is run through all 256 operand pairs and a 16-bit array
// through random pairs and corner values. Each multiplication is driven as
// the controller does it: one cycle with sw = 0 and hold = 1 (T1), then one
// with sw = 1 (T2). Both the normal product and the recomputed product
// must equal m * q computed by the testbench.
module tb_bido_array;
  localparam int NS = 4;
  localparam int NL = 16;
  logic clk = 0, rst_n = 0, sw = 0, hold = 0;
  logic [NS-1:0] ms, qs, ps_lo, ps_hi, pbs_lo, pbs_hi;
  logic [NL-1:0] ml, ql, pl_lo, pl_hi, pbl_lo, pbl_hi;
  int checks = 0, failures = 0;

  bido_array #(.N(NS)) dut_s (
    .clk(clk), .rst_n(rst_n), .sw(sw), .hold(hold), .m(ms), .q(qs), .m_bar(ms), .q_bar(qs),
    .p_lo(ps_lo), .p_hi(ps_hi), .pbar_lo(pbs_lo), .pbar_hi(pbs_hi));
  bido_array #(.N(NL)) dut_l (
    .clk(clk), .rst_n(rst_n), .sw(sw), .hold(hold), .m(ml), .q(ql), .m_bar(ml), .q_bar(ql),
    .p_lo(pl_lo), .p_hi(pl_hi), .pbar_lo(pbl_lo), .pbar_hi(pbl_hi));

  always #5 clk = ~clk;

  task automatic run(input logic [NS-1:0] a, input logic [NS-1:0] b,
                     input logic [NL-1:0] c, input logic [NL-1:0] d);
    logic [NS-1:0] s_lo, sb_lo;
    logic [NL-1:0] l_lo, lb_lo;
    logic [2*NS-1:0] es;
    logic [2*NL-1:0] el;
    @(negedge clk);
    ms = a; qs = b; ml = c; ql = d;
    sw = 1'b0; hold = 1'b1;               // T1
    @(posedge clk); #1;
    s_lo = ps_lo; sb_lo = pbs_lo; l_lo = pl_lo; lb_lo = pbl_lo;
    @(negedge clk);
    s_lo = ps_lo; sb_lo = pbs_lo; l_lo = pl_lo; lb_lo = pbl_lo;
    sw = 1'b1; hold = 1'b0;               // T2
    #1;
    es = (2*NS)'(a) * (2*NS)'(b);
    el = (2*NL)'(c) * (2*NL)'(d);
    checks += 4;
    if ({ps_hi, s_lo} !== es) begin
      failures++; $display("FAIL N=4 %0d*%0d P=%0d", a, b, {ps_hi, s_lo});
    end
    if ({pbs_hi, sb_lo} !== es) begin
      failures++; $display("FAIL N=4 %0d*%0d Pbar=%0d", a, b, {pbs_hi, sb_lo});
    end
    if ({pl_hi, l_lo} !== el) begin
      failures++; $display("FAIL N=16 %0d*%0d P=%0d", c, d, {pl_hi, l_lo});
    end
    if ({pbl_hi, lb_lo} !== el) begin
      failures++; $display("FAIL N=16 %0d*%0d Pbar=%0d", c, d, {pbl_hi, lb_lo});
    end
    @(posedge clk);
  endtask

  initial begin
    ms = '0; qs = '0; ml = '0; ql = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('1, '1, '1, '1);
    run('0, '1, 16'h8000, 16'h8000);
    run(4'h1, 4'h1, 16'h0001, 16'hffff);
    for (int v = 0; v < 256; v++) run(NS'(v >> 4), NS'(v), NL'($urandom), NL'($urandom));
    for (int i = 0; i < 300; i++) run(NS'($urandom), NS'($urandom), NL'($urandom), NL'($urandom));
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
