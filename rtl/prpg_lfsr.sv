// prpg_lfsr: pseudo-random pattern generator of the BIST architecture, built
// as an N-bit Galois linear feedback shift register.
//
// Each clock with `en` (the BIST controller's "BIST select") high, the
// register shifts right by one; when the bit shifted out is 1 the feedback
// polynomial POLY is XORed into the shifted value. The whole register is the
// pattern `q`, which the input multiplexer offers to the circuit under test in
// test mode. With `en` low the register holds. Reset (active low, synchronous)
// loads SEED, which must be non-zero.
//
// That the generator is an LFSR follows the document; its length, polynomial,
// seed and Galois form are this design's choices. The default POLY (taps
// 16,14,13,11) gives the maximal period 2^16-1.
module prpg_lfsr #(
  parameter int unsigned N    = 16,
  parameter logic [N-1:0] POLY = 16'hB400,
  parameter logic [N-1:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] q
);

  logic [N-1:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n)
      state <= SEED;
    else if (en)
      state <= (state >> 1) ^ (state[0] ? POLY : '0);
  end

  assign q = state;

  initial assert (SEED != '0) else $error("prpg_lfsr: SEED must be non-zero");

endmodule
