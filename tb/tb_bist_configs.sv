// tb_bist_configs: compares FSM branch coverage of the example circuit under
// two test configurations, each for a 1000-vector and a 10000-vector test:
//   masked   - the complete design, tm = 1: masks drive the status bits;
//   unmasked - same LFSR patterns and reset handling, status bits from the
//              datapath (masks applied in working mode, so ignored).
// Every clock it checks that the FSM's next state is the one the state graph
// gives for the status bits the FSM was shown (masks in the masked
// configuration, the observation outputs in the unmasked one). At the end it
// checks each test's length (TEST_LEN + TEST_LEN/20 + 1 clocks to done),
// that masking covers all eight branches and that it never covers fewer
// than the unmasked configuration. The coverage of each run is printed.
module tb_bist_configs;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n, tm;
  int checks = 0, failures = 0;

  logic [7:0] po_m1, po_m10, po_u1, po_u10;
  status_t obs_m1, obs_m10, obs_u1, obs_u10;
  logic done_m1, done_m10, done_u1, done_u10;

  bist_top #(.TEST_LEN(1000))  m1  (.clk(clk), .rst_n(rst_n), .tm(tm), .pi('0),
                                    .po(po_m1), .obs(obs_m1), .bist_done(done_m1));
  bist_top #(.TEST_LEN(10000)) m10 (.clk(clk), .rst_n(rst_n), .tm(tm), .pi('0),
                                    .po(po_m10), .obs(obs_m10), .bist_done(done_m10));
  unmasked_bist_harness #(.TEST_LEN(1000))  u1  (.clk(clk), .rst_n(rst_n), .start(tm),
                                                 .po(po_u1), .obs(obs_u1), .done(done_u1));
  unmasked_bist_harness #(.TEST_LEN(10000)) u10 (.clk(clk), .rst_n(rst_n), .start(tm),
                                                 .po(po_u10), .obs(obs_u10), .done(done_u10));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // branch number of the arc s -> n, -1 if the graph has no such arc
  function automatic int branch(input int s, input int n);
    case ({s[3:0], n[3:0]})
      8'h01: return 0;
      8'h15: return 1;
      8'h12: return 2;
      8'h24: return 3;
      8'h23: return 4;
      8'h34: return 5;
      8'h41: return 6;
      8'h50: return 7;
      default: return -1;
    endcase
  endfunction

  // expected next state from the status bits the FSM sees
  function automatic int next_of(input int s, input status_t st);
    case (s)
      0: return 1;
      1: return st[STAT_A] ? 5 : 2;
      2: return st[STAT_B] ? 4 : 3;
      3: return 4;
      4: return 1;
      default: return 0;
    endcase
  endfunction

  // per-run bookkeeping: index 0 m1, 1 m10, 2 u1, 3 u10
  int hits[4][8];
  int done_at[4];

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[4], n[4], e[4], br, cov[4];
    bit running[4], rs[4], dn[4];
    status_t seen[4];
    string names[4] = '{"masked   1000", "masked  10000", "unmasked 1000", "unmasked 10000"};
    rst_n = 1'b0;
    tm = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    tm = 1'b1;
    for (int c = 1; c <= 11000; c++) begin
      s[0] = int'(m1.u_cut.state);   seen[0] = m1.u_ctrl.mask;   rs[0] = m1.u_ctrl.cut_rst;  dn[0] = done_m1;
      s[1] = int'(m10.u_cut.state);  seen[1] = m10.u_ctrl.mask;  rs[1] = m10.u_ctrl.cut_rst; dn[1] = done_m10;
      s[2] = int'(u1.u_cut.state);   seen[2] = obs_u1;           rs[2] = u1.u_ctrl.cut_rst;  dn[2] = done_u1;
      s[3] = int'(u10.u_cut.state);  seen[3] = obs_u10;          rs[3] = u10.u_ctrl.cut_rst; dn[3] = done_u10;
      for (int r = 0; r < 4; r++) begin
        running[r] = !dn[r] && !rs[r];
        e[r] = next_of(s[r], seen[r]);
      end
      @(posedge clk);
      #1;
      n[0] = int'(m1.u_cut.state);
      n[1] = int'(m10.u_cut.state);
      n[2] = int'(u1.u_cut.state);
      n[3] = int'(u10.u_cut.state);
      for (int r = 0; r < 4; r++) begin
        if (rs[r]) begin
          check(n[r] == 0, "sequence reset returns the FSM to s0");
        end else begin
          check(n[r] == e[r], $sformatf("%s: next state", names[r]));
          br = branch(s[r], n[r]);
          if (running[r] && br >= 0) hits[r][br]++;
        end
      end
      if (done_m1  && done_at[0] == 0) done_at[0] = c;
      if (done_m10 && done_at[1] == 0) done_at[1] = c;
      if (done_u1  && done_at[2] == 0) done_at[2] = c;
      if (done_u10 && done_at[3] == 0) done_at[3] = c;
    end
    for (int r = 0; r < 4; r++) begin
      cov[r] = 0;
      for (int b = 0; b < 8; b++) cov[r] += (hits[r][b] > 0);
      $display("%s vectors: %0d of 8 branches, hits %p", names[r], cov[r], hits[r]);
    end
    check(done_at[0] == 1051 && done_at[2] == 1051, "1000-vector tests end at clock 1051");
    check(done_at[1] == 10501 && done_at[3] == 10501, "10000-vector tests end at clock 10501");
    check(cov[0] == 8 && cov[1] == 8, "masking covers all eight branches");
    check(cov[0] >= cov[2] && cov[1] >= cov[3], "masking covers at least as much as no masking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
