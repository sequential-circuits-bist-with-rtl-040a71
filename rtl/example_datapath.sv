// example_datapath: a small datapath for the example controller. It has three
// W-bit registers X, Y and Z, an adder, a decrementer and two conditional
// operations whose results are the status bits sent to the control part:
//   A = (X == 0)     loop finished
//   B = X[0]         X is odd
// Operations, one per control signal (see bist_pkg::ctrl_t):
//   ld_x : X <= a, Y <= 0
//   add_y: Y <= Y + b
//   dec_x: X <= X - 1
//   ld_z : Z <= Y
// Under the example FSM this accumulates b once for every even value X takes
// while counting down from a to 1, and then presents the sum on `z`, the
// primary outputs. Registers update on the rising clock edge; the status bits
// are combinational from X. Reset (synchronous, active high) clears X, Y, Z.
//
// The document names the datapath and says its status bits come from
// conditional operations, but gives no datapath for its example: everything
// in this one is this design's own choice, made so that both status bits and
// every branch they control can occur.
module example_datapath
  import bist_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  ctrl_t        ctrl,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output status_t      status,
  output logic [W-1:0] z
);

  logic [W-1:0] x, y;

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0;
      y <= '0;
      z <= '0;
    end else begin
      if (ctrl.ld_x) begin
        x <= a;
        y <= '0;
      end
      if (ctrl.add_y) y <= y + b;
      if (ctrl.dec_x) x <= x - 1'b1;
      if (ctrl.ld_z)  z <= y;
    end
  end

  always_comb begin
    status         = '0;
    status[STAT_A] = (x == '0);
    status[STAT_B] = x[0];
  end

endmodule
