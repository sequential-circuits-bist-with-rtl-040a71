// bist_top: the complete status-bit-masking BIST around the example system.
//
// Blocks: a PRPG (LFSR) produces one pseudo-random primary input vector per
// clock while the BIST controller asserts BIST select; an input multiplexer
// gives the circuit under test either its normal primary inputs (tm = 0) or
// that sequence (tm = 1); the BIST controller also supplies the masked status
// bits, which the circuit under test uses instead of its own status bits in
// test mode, and resets the circuit at the start of every test sequence.
//
// Use: with tm = 0 the system works normally on `pi`. Raising tm starts a
// test of TEST_LEN vectors; `bist_done` rises when it is complete. `po` and
// `obs` (the masked-out status bits) are the responses to observe; response
// compaction is not part of this design. Resets are synchronous; `rst_n` is
// active low and also resets the circuit under test.
//
// The architecture follows the document; the widths, the polynomial and seed
// of the LFSR and the test sequence length are this design's choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned TEST_LEN = 1000,
  parameter int unsigned SEQ_LEN  = 20,
  // LFSR feedback polynomial and seed, 2*W bits; the defaults are for W = 8
  parameter logic [2*W-1:0] LFSR_POLY = 16'hB400,
  parameter logic [2*W-1:0] LFSR_SEED = 16'hACE1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tm,
  input  logic [2*W-1:0] pi,
  output logic [W-1:0]   po,
  output status_t        obs,
  output logic           bist_done
);

  localparam int unsigned PI_W = 2 * W;

  logic            bist_sel, cut_rst;
  status_t         mask;
  logic [PI_W-1:0] pr, cut_pi;

  bist_controller #(
    .TEST_LEN (TEST_LEN),
    .SEQ_LEN  (SEQ_LEN)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .tm       (tm),
    .bist_sel (bist_sel),
    .cut_rst  (cut_rst),
    .mask     (mask),
    .done     (bist_done)
  );

  prpg_lfsr #(
    .N    (PI_W),
    .POLY (LFSR_POLY),
    .SEED (LFSR_SEED)
  ) u_prpg (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (bist_sel),
    .q     (pr)
  );

  input_mux #(.N(PI_W)) u_imux (
    .tm (tm),
    .pi (pi),
    .pr (pr),
    .y  (cut_pi)
  );

  dft_system #(.W(W)) u_cut (
    .clk  (clk),
    .rst  (!rst_n || cut_rst),
    .tm   (tm),
    .pi   (cut_pi),
    .mask (mask),
    .po   (po),
    .obs  (obs)
  );

endmodule
