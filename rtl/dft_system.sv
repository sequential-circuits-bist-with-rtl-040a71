// dft_system: the digital system modified for DfT. It is the example control
// FSM and the example datapath, with a multiplexer inserted on the status
// signals between them.
//
// In working mode (tm = 0) the FSM follows the datapath's status bits and the
// system behaves exactly like the unmodified design. In test mode (tm = 1)
// the FSM follows the `mask` inputs instead, so the test logic chooses which
// branch the FSM takes at every decision, while the datapath still runs on
// the primary inputs. The status bits the datapath computes are brought out
// on `obs` (observation points) in both modes.
//
// Interface: `pi` holds the datapath operands, b in the upper half and a in
// the lower half; `po` is the datapath's output register Z; reset is
// synchronous and active high and clears the FSM (to s0) and the datapath.
// All outputs are registered except `obs`, which follows X combinationally.
//
// The structure (FSM, datapath, status MUX, observation points, TM and masked
// status bits as extra inputs) follows the document; the example FSM and
// datapath are described in their own modules. In the source design the
// reset enters the FSM only; here it also clears the datapath registers so
// that the outputs are defined from the first clock. The FSM state is kept
// internal, as in the source design (no state port), so lint reports it as
// unused; simulation reads it hierarchically.
module dft_system
  import bist_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           tm,
  input  logic [2*W-1:0] pi,
  input  status_t        mask,
  output logic [W-1:0]   po,
  output status_t        obs
);

  ctrl_t      ctrl;
  status_t    dp_status, fsm_status;
  fsm_state_t state;

  example_fsm u_fsm (
    .clk    (clk),
    .rst    (rst),
    .status (fsm_status),
    .state  (state),
    .ctrl   (ctrl)
  );

  example_datapath #(.W(W)) u_dp (
    .clk    (clk),
    .rst    (rst),
    .ctrl   (ctrl),
    .a      (pi[W-1:0]),
    .b      (pi[2*W-1:W]),
    .status (dp_status),
    .z      (po)
  );

  status_mux #(.W(STATUS_W)) u_smux (
    .tm         (tm),
    .dp_status  (dp_status),
    .mask       (mask),
    .fsm_status (fsm_status),
    .obs        (obs)
  );

endmodule
