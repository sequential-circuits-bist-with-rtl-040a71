// tb_dft_system: self-checking testbench of the DfT-modified example system.
// Part 1 runs the system in working mode (tm = 0) on fixed operands and
// checks both the result, b * floor(a/2) mod 2^W, and the clock at which it
// appears (1 + 3a + floor(a/2) + 2 clocks after reset). Part 2 drives random
// operands, modes, masks and resets and compares the outputs, the
// observation points and the FSM state every clock with a reference model of
// controller, datapath and status multiplexer written out here; it also
// counts the decisions where the mask overrode the datapath's own status.
module tb_dft_system;
  import bist_pkg::*;

  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst, tm;
  logic [2*W-1:0] pi;
  status_t mask, obs;
  logic [W-1:0] po;
  int checks = 0, failures = 0;
  int overrides = 0;

  dft_system #(.W(W)) dut (.clk(clk), .rst(rst), .tm(tm), .pi(pi), .mask(mask),
                           .po(po), .obs(obs));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t st=%0d", what, $time, dut.state);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, x, y, z, av, bv, lat, n;
    bit sa, sb;
    // ---------------- part 1: working mode, directed operands
    tm = 1'b0;
    mask = 2'b11;   // must be ignored in working mode
    for (int t = 0; t < 6; t++) begin
      av = (t == 0) ? 1 : 2 + int'($urandom % 20);
      bv = 1 + int'($urandom % 255);
      pi = {W'(bv), W'(av)};
      rst = 1'b1;
      @(posedge clk);
      #1 rst = 1'b0;
      lat = 1 + 3 * av + av / 2 + 2;
      n = 0;
      while (n < lat - 1) begin
        @(posedge clk);
        #1 n++;
        check(po == '0, "no result before the expected clock");
      end
      @(posedge clk);
      #1 check(int'(po) == (bv * (av / 2)) % (1 << W),
               $sformatf("result for a=%0d b=%0d: got %0d", av, bv, po));
    end
    // ---------------- part 2: random modes against the reference model
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    s = 0; x = 0; y = 0; z = 0;
    for (int i = 0; i < 5000; i++) begin
      tm   = ($urandom % 3) != 0;
      mask = status_t'($urandom);
      pi   = 2*W'($urandom);
      if ($urandom % 4 == 0) pi[W-1:0] = W'($urandom % 4);
      rst  = ($urandom % 200) == 0;
      #1;
      check(obs[STAT_A] == (x == 0) && obs[STAT_B] == x[0], "observation points");
      check(int'(dut.state) == s, "FSM state");
      check(int'(po) == z, "primary outputs");
      sa = tm ? mask[STAT_A] : (x == 0);
      sb = tm ? mask[STAT_B] : x[0];
      if (tm && ((s == 1 && sa != (x == 0)) || (s == 2 && sb != x[0]))) overrides++;
      if (rst) begin
        s = 0; x = 0; y = 0; z = 0;
      end else begin
        case (s)
          0: begin x = int'(pi[W-1:0]); y = 0; s = 1; end
          1: s = sa ? 5 : 2;
          2: s = sb ? 4 : 3;
          3: begin y = (y + int'(pi[2*W-1:W])) % (1 << W); s = 4; end
          4: begin x = (x + (1 << W) - 1) % (1 << W); s = 1; end
          default: begin z = y; s = 0; end
        endcase
      end
      @(posedge clk);
      #1;
    end
    check(overrides > 0, "masks overrode the datapath status");
    $display("mask overrides: %0d", overrides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
