// unmasked_bist_harness: test-only variant of bist_top for comparison. The
// same controller and LFSR drive the example circuit with pseudo-random
// inputs and a reset pulse per test sequence, but the circuit's status
// multiplexer stays in working mode, so the masks reach it and are ignored
// and the FSM follows the datapath's own status bits. This is the
// "masks applied in normal mode" configuration of the evaluation, used to
// show what status-bit masking adds.
module unmasked_bist_harness #(
  parameter int unsigned TEST_LEN = 1000,
  parameter int unsigned SEQ_LEN  = 20
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,   // test enable of the controller
  output logic [7:0]            po,
  output bist_pkg::status_t     obs,
  output logic                  done
);
  import bist_pkg::*;

  logic        bist_sel, cut_rst;
  status_t     mask;
  logic [15:0] pr;

  bist_controller #(.TEST_LEN(TEST_LEN), .SEQ_LEN(SEQ_LEN)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .tm(start),
    .bist_sel(bist_sel), .cut_rst(cut_rst), .mask(mask), .done(done));

  prpg_lfsr u_prpg (.clk(clk), .rst_n(rst_n), .en(bist_sel), .q(pr));

  dft_system #(.W(8)) u_cut (
    .clk(clk), .rst(!rst_n || cut_rst), .tm(1'b0), .pi(pr), .mask(mask),
    .po(po), .obs(obs));

endmodule
