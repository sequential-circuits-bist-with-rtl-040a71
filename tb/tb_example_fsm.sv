// tb_example_fsm: self-checking testbench of the six-state example
// controller. Random status bits (and occasional resets) are applied; every
// state and control output is compared with a reference transition table
// written out here, and each of the eight branches of the state graph must
// be taken at least once.
module tb_example_fsm;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst;
  status_t status;
  fsm_state_t state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int branch_hits[8];

  example_fsm dut (.clk(clk), .rst(rst), .status(status), .state(state), .ctrl(ctrl));

  always #5 clk = ~clk;

  // Reference next state (as integers) and branch number of the arc taken.
  function automatic int ref_next(input int s, input bit a, input bit b, output int br);
    case (s)
      0: begin br = 0; return 1; end
      1: if (a) begin br = 1; return 5; end else begin br = 2; return 2; end
      2: if (b) begin br = 3; return 4; end else begin br = 4; return 3; end
      3: begin br = 5; return 4; end
      4: begin br = 6; return 1; end
      default: begin br = 7; return 0; end
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (state=%0d)", what, state);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s_ref, br;
    rst = 1'b1;
    status = '0;
    @(posedge clk);
    #1 check(state == S0, "reset state is s0");
    rst = 1'b0;
    s_ref = 0;
    for (int i = 0; i < 2000; i++) begin
      status = status_t'($urandom);
      rst = ($urandom % 97) == 0;
      #1;
      // Moore outputs of the current state
      check(ctrl.ld_x == (s_ref == 0) && ctrl.add_y == (s_ref == 3) &&
            ctrl.dec_x == (s_ref == 4) && ctrl.ld_z == (s_ref == 5), "control outputs");
      if (rst) begin
        s_ref = 0;
      end else begin
        s_ref = ref_next(s_ref, status[STAT_A], status[STAT_B], br);
        branch_hits[br]++;
      end
      @(posedge clk);
      #1 check(int'(state) == s_ref, "next state");
    end
    foreach (branch_hits[k]) check(branch_hits[k] > 0, $sformatf("branch %0d taken", k));
    $display("branch hits: %p", branch_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
