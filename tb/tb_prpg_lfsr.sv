// tb_prpg_lfsr: self-checking testbench of the LFSR pattern generator at its
// default size (16 bits). It checks the reset value, every step against a
// reference next-state function written out here, holding while the enable is
// low, and that the sequence first returns to the seed after exactly 2^16-1
// steps (a maximal-length sequence).
module tb_prpg_lfsr;

  localparam int unsigned N = 16;
  localparam logic [N-1:0] SEED = 16'hACE1;

  logic clk = 1'b0;
  logic rst_n, en;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  prpg_lfsr dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q));

  always #5 clk = ~clk;

  // Reference: taps 16,14,13,11 of the Galois form; the bit shifted out is
  // fed back into bits 15, 13, 12 and 10.
  function automatic logic [N-1:0] ref_next(input logic [N-1:0] s);
    logic [N-1:0] r;
    r = {1'b0, s[N-1:1]};
    if (s[0]) begin
      r[15] = ~r[15];
      r[13] = ~r[13];
      r[12] = ~r[12];
      r[10] = ~r[10];
    end
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (q=%h)", what, q);
    end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] expect_q;
    int period;
    rst_n = 1'b0;
    en    = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(q == SEED, "reset loads the seed");
    rst_n = 1'b1;
    // hold while disabled
    repeat (3) @(posedge clk);
    #1 check(q == SEED, "holds while en is low");
    // step and compare with the reference, until the seed comes back
    en = 1'b1;
    expect_q = SEED;
    period = 0;
    do begin
      @(posedge clk);
      #1;
      expect_q = ref_next(expect_q);
      period++;
      check(q == expect_q, "step matches the reference");
      check(q != '0, "never reaches the all-zero state");
    end while (q != SEED && period < 70000);
    check(period == 65535, "period is 2^16-1");
    $display("period = %0d", period);
    // random enable pattern
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom);
      @(posedge clk);
      #1;
      if (en) expect_q = ref_next(expect_q);
      check(q == expect_q, "step or hold under random enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
