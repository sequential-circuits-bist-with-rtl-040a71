// tb_bist_top: end-to-end, self-checking testbench of the complete BIST at
// its default parameters (8-bit datapath, 1000-vector test in sequences of
// 20, 16-bit LFSR). A reference model written out here (LFSR, controller
// sequence, example FSM and datapath, status and input multiplexers)
// predicts the primary outputs, the observation points, the FSM state and
// bist_done on every clock.
//
// Phases: working mode on fixed operands (results must match
// b * floor(a/2)); a full self-test with tm = 1 (1000 vectors, 50 sequences,
// done 1051 clocks after tm rises); a return to working mode. Each mechanism
// is counted and must occur: both mode switches, the reset pulse between
// sequences, each of the three masks, each of the eight branches of the
// example state graph while testing, a mask overriding the datapath status,
// and the end of the test.
module tb_bist_top;
  import bist_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  logic rst_n, tm;
  logic [2*W-1:0] pi;
  logic [W-1:0] po;
  status_t obs;
  logic bist_done;
  int checks = 0, failures = 0;

  bist_top dut (.clk(clk), .rst_n(rst_n), .tm(tm), .pi(pi), .po(po), .obs(obs),
                .bist_done(bist_done));

  always #5 clk = ~clk;

  // ---------------- reference model state
  int s, x, y, z;            // FSM state and datapath registers
  logic [15:0] lfsr;         // PRPG
  int k;                     // clocks since the first edge that saw tm = 1
  bit prev_tm;

  // mechanism counters
  int n_to_test, n_to_normal, n_cut_rst, n_vectors, n_overrides, n_done, n_results;
  int mask_seq[3];
  int branch_hits[8];

  function automatic logic [15:0] lfsr_next(input logic [15:0] v);
    logic [15:0] r;
    r = {1'b0, v[15:1]};
    if (v[0]) r ^= 16'b1011_0100_0000_0000;   // taps 16,14,13,11
    return r;
  endfunction

  function automatic status_t mask_of(input int j);
    case (j % 3)
      0: return 2'b01;   // A=1
      1: return 2'b00;   // A=0, B=0
      default: return 2'b10;   // A=0, B=1
    endcase
  endfunction

  // Controller outputs k clocks into a test: {cut_rst, bist_sel, done}, mask
  // and the sequence number.
  function automatic void ctrl_ref(input int kk, output logic [2:0] o, output status_t m, output int j);
    int t, left, run;
    o = 3'b000; m = mask_of(0); j = 0;
    if (kk == 0) return;
    t = 1; left = 1000;
    while (left > 0) begin
      if (kk == t) begin o = 3'b100; m = mask_of(j); return; end
      run = (left < 20) ? left : 20;
      if (kk > t && kk <= t + run) begin o = 3'b010; m = mask_of(j); return; end
      t += run + 1;
      left -= run;
      j++;
    end
    o = 3'b001; m = mask_of(j - 1); j = -1;   // mask of the last sequence stays
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t (model s=%0d x=%0d)", what, $time, s, x);
    end
  endtask

  // One clock: check outputs against the model, then advance model and DUT.
  task automatic step();
    logic [2:0] o;
    status_t m;
    int j, a_in, b_in, br;
    bit sa, sb, crst;
    if (tm && !prev_tm) n_to_test++;
    if (!tm && prev_tm) n_to_normal++;
    prev_tm = tm;
    #1;
    ctrl_ref(k, o, m, j);
    check(int'(po) == z, "primary outputs");
    check(obs[STAT_A] == (x == 0) && obs[STAT_B] == x[0], "observation points");
    check(int'(dut.u_cut.state) == s, "FSM state");
    check(bist_done == o[0], "bist_done");
    crst = o[2];
    a_in = tm ? int'(lfsr[W-1:0]) : int'(pi[W-1:0]);
    b_in = tm ? int'(lfsr[2*W-1:W]) : int'(pi[2*W-1:W]);
    sa = tm ? m[STAT_A] : (x == 0);
    sb = tm ? m[STAT_B] : x[0];
    if (tm && ((s == 1 && sa != (x == 0)) || (s == 2 && sb != x[0]))) n_overrides++;
    if (crst) begin
      n_cut_rst++;
      s = 0; x = 0; y = 0; z = 0;
    end else begin
      case (s)
        0: begin x = a_in; y = 0; s = 1; br = 0; end
        1: begin s = sa ? 5 : 2; br = sa ? 1 : 2; end
        2: begin s = sb ? 4 : 3; br = sb ? 3 : 4; end
        3: begin y = (y + b_in) % (1 << W); s = 4; br = 5; end
        4: begin x = (x + (1 << W) - 1) % (1 << W); s = 1; br = 6; end
        default: begin z = y; s = 0; br = 7; if (!tm) n_results++; end
      endcase
      if (tm) branch_hits[br]++;
    end
    if (o[1]) begin
      n_vectors++;
      if (j >= 0 && kk_first_of_seq(k)) mask_seq[j % 3]++;
      lfsr = lfsr_next(lfsr);
    end
    if (o[0] && tm) n_done++;
    k = tm ? k + 1 : 0;   // the controller leaves idle on the first edge with tm = 1
    @(posedge clk);
    #1;
  endtask

  // true on the first vector clock of a sequence (reset was one clock before)
  function automatic bit kk_first_of_seq(input int kk);
    logic [2:0] o;
    status_t m;
    int j;
    ctrl_ref(kk - 1, o, m, j);
    return o[2];
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int done_clock;
    rst_n = 1'b0;
    tm = 1'b0;
    pi = '0;
    prev_tm = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    s = 0; x = 0; y = 0; z = 0; lfsr = 16'hACE1; k = 0;
    // ---- working mode: three computations on fixed operands
    for (int r = 0; r < 3; r++) begin
      int av, bv, z0;
      av = 3 + int'($urandom % 12);
      bv = 1 + int'($urandom % 200);
      pi = {W'(bv), W'(av)};
      z0 = n_results;
      while (n_results == z0) step();   // Z is loaded on the clock that leaves s5
      check(int'(po) == (bv * (av / 2)) % 256, $sformatf("working-mode result a=%0d b=%0d", av, bv));
    end
    // ---- self-test
    tm = 1'b1;
    done_clock = 0;
    for (int c = 1; c <= 1060; c++) begin
      pi = 2*W'($urandom);   // must be ignored in test mode
      step();
      if (bist_done && done_clock == 0) done_clock = c;
    end
    check(done_clock == 1051, $sformatf("test ends 1051 clocks after tm rises (%0d)", done_clock));
    // ---- back to working mode
    tm = 1'b0;
    pi = {W'(7), W'(5)};
    // the first result may come from operands loaded during the test
    begin
      int z0;
      z0 = n_results;
      while (n_results < z0 + 2) step();
    end
    check(int'(po) == 14, "working mode after the test");

    check(n_to_test > 0, "switch to test mode");
    check(n_to_normal > 0, "switch back to working mode");
    check(n_results >= 3, "working-mode computations");
    check(n_cut_rst == 50, $sformatf("50 reset pulses between sequences (%0d)", n_cut_rst));
    check(n_vectors == 1000, $sformatf("1000 pseudo-random vectors (%0d)", n_vectors));
    foreach (mask_seq[i]) check(mask_seq[i] > 0, $sformatf("mask %0d applied", i));
    foreach (branch_hits[i]) check(branch_hits[i] > 0, $sformatf("branch %0d taken in test mode", i));
    check(n_overrides > 0, "mask overrides the datapath status");
    check(n_done > 0, "test completed");
    $display("sequences per mask: %p", mask_seq);
    $display("branch hits in test mode: %p", branch_hits);
    $display("resets=%0d vectors=%0d overrides=%0d results=%0d",
             n_cut_rst, n_vectors, n_overrides, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
