// input_mux: the multiplexer in front of the circuit under test. In normal
// mode (tm = 0) the circuit sees its normal primary inputs `pi`; in test mode
// (tm = 1) it sees the pseudo-random sequence `pr` from the PRPG. Purely
// combinational, no latency.
//
// The selection by the test mode signal follows the document's architecture;
// the width N is this design's choice (the width of the example circuit's
// primary inputs).
module input_mux #(
  parameter int unsigned N = 16
) (
  input  logic         tm,
  input  logic [N-1:0] pi,
  input  logic [N-1:0] pr,
  output logic [N-1:0] y
);

  always_comb y = tm ? pr : pi;

endmodule
