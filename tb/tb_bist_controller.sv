// tb_bist_controller: self-checking testbench of the BIST controller. Two
// instances run side by side from the same test mode input: a short one
// (47 vectors in sequences of 10, so the last sequence is cut short) and one
// with the default 1000 vectors in sequences of 20. For each, the expected
// clock-by-clock outputs (reset pulse, PRPG enable, mask, done) are built
// here from the sequence rules and compared every clock; the number of
// vectors and the clock at which done rises are checked. A test abandoned by
// dropping tm must return the controller to idle and restart cleanly.
module tb_bist_controller;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n, tm;
  logic sel_s, rst_s, done_s, sel_d, rst_d, done_d;
  status_t mask_s, mask_d;
  int checks = 0, failures = 0;

  bist_controller #(.TEST_LEN(47), .SEQ_LEN(10)) dut_s (
    .clk(clk), .rst_n(rst_n), .tm(tm),
    .bist_sel(sel_s), .cut_rst(rst_s), .mask(mask_s), .done(done_s));

  bist_controller dut_d (
    .clk(clk), .rst_n(rst_n), .tm(tm),
    .bist_sel(sel_d), .cut_rst(rst_d), .mask(mask_d), .done(done_d));

  always #5 clk = ~clk;

  // the three branch masks {B,A}: A=1 ; A=0,B=0 ; A=0,B=1
  function automatic status_t mask_of(input int j);
    case (j % 3)
      0: return 2'b01;
      1: return 2'b00;
      default: return 2'b10;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Expected outputs k clocks after the first rising edge that sees tm = 1
  // (k = 1 is the first reset pulse). Returns {cut_rst, bist_sel, done, mask}.
  function automatic logic [4:0] expected(input int k, input int tlen, input int slen);
    int t, j, left, run;
    t = 1;
    j = 0;
    left = tlen;
    while (left > 0) begin
      if (k == t) return {1'b1, 1'b0, 1'b0, mask_of(j)};
      run = (left < slen) ? left : slen;
      if (k > t && k <= t + run) return {1'b0, 1'b1, 1'b0, mask_of(j)};
      t += run + 1;
      left -= run;
      j++;
    end
    return {1'b0, 1'b0, 1'b1, mask_of(j - 1 + ((tlen % slen) == 0 ? 1 : 0))};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vec_s, vec_d, done_at_s, done_at_d, rst_pulses_d;
    logic [4:0] e;
    rst_n = 1'b0;
    tm = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(!sel_d && !rst_d && !done_d && !sel_s && !rst_s && !done_s, "idle while tm = 0");
    // ---- abandoned test
    tm = 1'b1;
    repeat (15) @(posedge clk);
    #1 tm = 1'b0;
    @(posedge clk);
    #1 check(!sel_d && !rst_d && !done_d && mask_d == mask_of(0), "dropping tm returns to idle");
    // ---- complete test
    tm = 1'b1;
    vec_s = 0; vec_d = 0; done_at_s = 0; done_at_d = 0; rst_pulses_d = 0;
    for (int k = 1; k <= 1100; k++) begin
      @(posedge clk);
      #1;
      e = expected(k, 47, 10);
      check({rst_s, sel_s, done_s, mask_s} == e, "short instance outputs");
      e = expected(k, 1000, 20);
      if (!done_d) check({rst_d, sel_d, done_d} == e[4:2] && (!e[3] && !e[4] || mask_d == e[1:0]),
                         "default instance outputs");
      else check(e[2], "default instance done");
      vec_s += sel_s;
      vec_d += sel_d;
      rst_pulses_d += rst_d;
      if (done_s && done_at_s == 0) done_at_s = k;
      if (done_d && done_at_d == 0) done_at_d = k;
    end
    check(vec_s == 47, $sformatf("short test applies 47 vectors (%0d)", vec_s));
    check(vec_d == 1000, $sformatf("default test applies 1000 vectors (%0d)", vec_d));
    check(rst_pulses_d == 50, $sformatf("50 test sequences (%0d)", rst_pulses_d));
    check(done_at_s == 47 + 5 + 1, $sformatf("short test done at clock 53 (%0d)", done_at_s));
    check(done_at_d == 1000 + 50 + 1, $sformatf("default test done at clock 1051 (%0d)", done_at_d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
