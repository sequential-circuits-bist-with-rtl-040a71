// bist_pkg: types and constants shared by the status-bit-controlled BIST
// example. It holds the state type of the six-state example controller, the
// bundle of control signals that the controller sends to the datapath, the
// position of the two status bits (A and B) in a status vector, and the
// default table of status masks that makes the controller traverse every
// branch of its state graph.
//
// The state graph and the three masks follow the document's example; the
// binary state encoding, the bit order of the status vector and the control
// signal set are this design's own choices.
package bist_pkg;

  // Number of status bits entering the control part (A and B).
  localparam int unsigned STATUS_W = 2;
  localparam int unsigned STAT_A   = 0;  // status bit A at index 0
  localparam int unsigned STAT_B   = 1;  // status bit B at index 1

  typedef logic [STATUS_W-1:0] status_t;

  // States s0..s5 of the example controller, binary encoded.
  typedef enum logic [2:0] {
    S0 = 3'd0,
    S1 = 3'd1,
    S2 = 3'd2,
    S3 = 3'd3,
    S4 = 3'd4,
    S5 = 3'd5
  } fsm_state_t;

  // Control signals from the FSM to the datapath (one-hot per state, Moore).
  typedef struct packed {
    logic ld_x;    // X <= primary input a, Y <= 0        (s0)
    logic add_y;   // Y <= Y + primary input b            (s3)
    logic dec_x;   // X <= X - 1                          (s4)
    logic ld_z;    // Z (primary output register) <= Y    (s5)
  } ctrl_t;

  // Masks covering all branches of the example state graph:
  //   mask 0: A=1       -> s0 s1 s5 s0
  //   mask 1: A=0, B=0  -> s0 s1 s2 s3 s4 s1
  //   mask 2: A=0, B=1  -> s1 s2 s4
  // B is a don't-care under mask 0 and is driven 0.
  localparam int unsigned NUM_MASKS = 3;
  localparam logic [NUM_MASKS*STATUS_W-1:0] BRANCH_MASKS = {
    2'b10,   // mask 2: B=1, A=0
    2'b00,   // mask 1: B=0, A=0
    2'b01    // mask 0: B=0, A=1
  };

endpackage
