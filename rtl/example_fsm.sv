// example_fsm: the control part of the example system, a six-state Moore
// machine whose two branching points depend on the status bits A and B.
//
// State graph (all arcs are taken on one clock edge):
//   s0 -> s1
//   s1 -> s5 if A = 1,  s1 -> s2 if A = 0
//   s2 -> s4 if B = 1,  s2 -> s3 if B = 0
//   s3 -> s4,  s4 -> s1,  s5 -> s0
// Reset (synchronous, active high) returns to s0. The control output `ctrl`
// and the state output `state` depend on the current state only.
//
// The graph is the document's example; the state encoding and which datapath
// operation each state issues are this design's choices (see bist_pkg).
module example_fsm
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  status_t    status,   // A = status[STAT_A], B = status[STAT_B]
  output fsm_state_t state,
  output ctrl_t      ctrl
);

  fsm_state_t next;

  always_comb begin
    next = state;
    unique case (state)
      S0: next = S1;
      S1: next = status[STAT_A] ? S5 : S2;
      S2: next = status[STAT_B] ? S4 : S3;
      S3: next = S4;
      S4: next = S1;
      S5: next = S0;
      default: next = S0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S0;
    else     state <= next;
  end

  always_comb begin
    ctrl       = '0;
    ctrl.ld_x  = (state == S0);
    ctrl.add_y = (state == S3);
    ctrl.dec_x = (state == S4);
    ctrl.ld_z  = (state == S5);
  end

endmodule
