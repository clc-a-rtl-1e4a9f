// clc_adaptive_control: the Adaptive Control FSM of the CLC-A decoder.
//
// Four states, as the CLC-A architecture defines them:
//   IDLE    EN=0 READY=0; stays while START=0, goes to DEC_PT1 on START=1.
//   DEC_PT1 EN=1: the Sub-Decoder runs the first correction step. On the next
//           clock the FSM reads EXTEND: 1 goes to DEC_PT2, 0 to FINISH.
//   DEC_PT2 EN=1: second correction step, then FINISH.
//   FINISH  EN=0 READY=1 for one cycle, then IDLE.
// RESET returns the FSM to IDLE from any state; it is synchronous and active
// high here (the reset style is this design's choice).
// Timing: with START sampled high at clock edge k, READY is high in the cycle
// after edge k+2 (one step) or after edge k+3 (two steps).
module clc_adaptive_control
  import clc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  logic      extend,
  output logic      en,
  output logic      ready,
  output ac_state_t state
);

  ac_state_t state_n;

  always_comb begin
    unique case (state)
      ST_IDLE:    state_n = start  ? ST_DEC_PT1 : ST_IDLE;
      ST_DEC_PT1: state_n = extend ? ST_DEC_PT2 : ST_FINISH;
      ST_DEC_PT2: state_n = ST_FINISH;
      ST_FINISH:  state_n = ST_IDLE;
      default:    state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_IDLE;
    else     state <= state_n;
  end

  assign en    = (state == ST_DEC_PT1) || (state == ST_DEC_PT2);
  assign ready = (state == ST_FINISH);

  // A second step can only follow a first one.
  a_pt2_after_pt1: assert property (@(posedge clk) disable iff (rst)
    state == ST_DEC_PT2 |-> $past(state) == ST_DEC_PT1);

endmodule
