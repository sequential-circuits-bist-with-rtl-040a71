// bist_controller: sequencer of the status-bit-masking BIST. While the test
// mode input `tm` is high it runs one test of TEST_LEN pseudo-random vectors,
// split into test sequences of SEQ_LEN vectors. Each sequence starts with
// one clock of `cut_rst`, which returns the circuit under test to its reset
// state, and then holds the global reset inactive while `bist_sel` lets the
// PRPG produce one new vector per clock. During a sequence `mask` is constant
// and equal to one entry of the mask table MASKS; consecutive sequences take
// the entries in turn (0, 1, ..., NUM_MASKS-1, 0, ...), so every path that
// the table describes is driven through the FSM repeatedly. After the last
// vector `done` rises and stays high until `tm` falls; dropping `tm` at any
// time abandons the test and returns the controller to idle.
//
// Timing: tm rising -> next clock cut_rst=1 for one clock -> SEQ_LEN clocks
// with bist_sel=1 -> cut_rst again, and so on; the test takes TEST_LEN clocks
// of bist_sel plus ceil(TEST_LEN/SEQ_LEN) reset clocks. Reset is synchronous
// and active low.
//
// The document gives the controller's tasks (activate the PRPG, drive the
// status bits, masks derived from covering all branches), the 1000-vector
// test length and the inactive reset during each test sequence. The sequence
// length, the round-robin order of the masks and the reset pulse between
// sequences are this design's choices.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned TEST_LEN  = 1000,
  parameter int unsigned SEQ_LEN   = 20,
  parameter int unsigned MASK_W    = STATUS_W,
  parameter int unsigned NMASK     = NUM_MASKS,
  parameter logic [NMASK*MASK_W-1:0] MASKS = BRANCH_MASKS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tm,
  output logic              bist_sel,   // PRPG enable
  output logic              cut_rst,    // reset pulse to the circuit under test
  output logic [MASK_W-1:0] mask,       // masked status bits
  output logic              done
);

  typedef enum logic [1:0] {
    C_IDLE,
    C_RESET,
    C_RUN,
    C_DONE
  } cstate_t;

  localparam int unsigned VW = $clog2(TEST_LEN + 1);
  localparam int unsigned SW = $clog2(SEQ_LEN + 1);
  localparam int unsigned MW = (NMASK > 1) ? $clog2(NMASK) : 1;

  cstate_t       st;
  logic [VW-1:0] vec_cnt;   // vectors applied so far in this test
  logic [SW-1:0] seq_cnt;   // vectors applied so far in this sequence
  logic [MW-1:0] mask_idx;  // mask table entry of the current sequence

  always_ff @(posedge clk) begin
    if (!rst_n || !tm) begin
      st       <= C_IDLE;
      vec_cnt  <= '0;
      seq_cnt  <= '0;
      mask_idx <= '0;
    end else begin
      unique case (st)
        C_IDLE: begin
          st       <= C_RESET;
          vec_cnt  <= '0;
          mask_idx <= '0;
        end
        C_RESET: begin
          st      <= C_RUN;
          seq_cnt <= '0;
        end
        C_RUN: begin
          vec_cnt <= vec_cnt + 1'b1;
          seq_cnt <= seq_cnt + 1'b1;
          if (vec_cnt == VW'(TEST_LEN - 1)) begin
            st <= C_DONE;
          end else if (seq_cnt == SW'(SEQ_LEN - 1)) begin
            st       <= C_RESET;
            mask_idx <= (mask_idx == MW'(NMASK - 1)) ? '0 : mask_idx + 1'b1;
          end
        end
        C_DONE: st <= C_DONE;
        default: st <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    bist_sel = (st == C_RUN);
    cut_rst  = (st == C_RESET);
    done     = (st == C_DONE);
    mask     = MASKS[mask_idx*MASK_W +: MASK_W];
  end

  // Protocol rules: the CUT is never reset while a vector is applied, and the
  // mask does not change within a test sequence.
  a_no_reset_during_vector: assert property (@(posedge clk) !(bist_sel && cut_rst));
  a_mask_stable_in_sequence: assert property (@(posedge clk) disable iff (!rst_n)
      (bist_sel && $past(bist_sel)) |-> $stable(mask));

  initial begin
    assert (TEST_LEN > 0 && SEQ_LEN > 0 && NMASK > 0)
      else $error("bist_controller: TEST_LEN, SEQ_LEN and NMASK must be positive");
  end

endmodule
