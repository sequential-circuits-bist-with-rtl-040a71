// status_mux: the DfT multiplexer on the status signals that enter the
// control part. In working mode (tm = 0) the FSM receives the status bits the
// datapath computes; in test mode (tm = 1) it receives the masked status bits
// supplied from outside (by the BIST controller). The datapath status bits are
// also passed to `obs`, the dedicated observation points, so that the values
// masked out in test mode stay observable. Combinational, no latency.
//
// Structure and selection follow the document; the width is one multiplexer
// per status bit, two for the example circuit.
module status_mux #(
  parameter int unsigned W = bist_pkg::STATUS_W
) (
  input  logic         tm,
  input  logic [W-1:0] dp_status,    // status bits computed by the datapath
  input  logic [W-1:0] mask,         // masked status bits (test values)
  output logic [W-1:0] fsm_status,   // status bits seen by the FSM
  output logic [W-1:0] obs           // observation points
);

  always_comb begin
    fsm_status = tm ? mask : dp_status;
    obs        = dp_status;
  end

endmodule
