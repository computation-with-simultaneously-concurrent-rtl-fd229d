// Controller of the BIDO multiplier: sequences the two half-computations
// and drives the bi-switch control signal.
//
// A multiplication takes two clock cycles, T1 and T2, each long enough for
// half of the array delay. In T1 sw is 0 and hold is 1, so the crossing
// carries of the central part and the low half of both results are
// captured at the edge that ends T1. In T2 sw is 1 (the bi-switches have
// turned) and capture is 1, so the complete results and the comparison are
// captured at the edge that ends T2. A start is accepted when the
// controller is idle or in T2 (ready = 1); load then registers the
// operands at the same edge, so back-to-back operations give one result
// every two cycles. Latency: start sampled at edge 0, results registered at
// edge 2, valid high in the cycle after edge 2. That one switch signal
// controls the array follows the BIDO method; the state machine, the
// handshake and the asynchronous active-low reset are this design's.
module bido_ctrl
  import bido_pkg::*;
(
  input  logic clk,
  input  logic rst_n,    // asynchronous, active low
  input  logic start,    // request a multiplication
  output logic ready,    // a start is accepted in this cycle
  output logic load,     // register the operands
  output logic sw,       // bi-switch control: 0 = T1 setting, 1 = T2 setting
  output logic hold,     // last cycle of T1: capture the first half
  output logic capture,  // last cycle of T2: capture the results
  output state_e state   // current phase
);

  state_e state_nxt;

  always_comb begin
    ready   = (state != ST_T1);
    load    = start && ready;
    sw      = (state == ST_T2);
    hold    = (state == ST_T1);
    capture = (state == ST_T2);
    unique case (state)
      ST_IDLE: state_nxt = start ? ST_T1 : ST_IDLE;
      ST_T1:   state_nxt = ST_T2;
      ST_T2:   state_nxt = start ? ST_T1 : ST_IDLE;
      default: state_nxt = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_nxt;
  end

  // the switches only turn after a completed first half
  a_t2_after_t1: assert property (@(posedge clk) disable iff (!rst_n)
                                  state == ST_T2 |-> $past(state) == ST_T1);
  a_t1_to_t2:    assert property (@(posedge clk) disable iff (!rst_n)
                                  state == ST_T1 |=> state == ST_T2);
  a_hold_sw:     assert property (@(posedge clk) disable iff (!rst_n)
                                  !(hold && sw));

endmodule
