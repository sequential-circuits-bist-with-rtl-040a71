// tb_example_datapath: self-checking testbench of the example datapath.
// Random single control operations and operands are applied; registers X, Y
// and Z are tracked by a reference model written out here, and the output Z
// and the status bits A = (X == 0) and B = X[0] are compared every clock.
module tb_example_datapath;
  import bist_pkg::*;

  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst;
  ctrl_t ctrl;
  logic [W-1:0] a, b, z;
  status_t status;
  int checks = 0, failures = 0;
  int a_zero_seen = 0, b_odd_seen = 0;

  example_datapath #(.W(W)) dut (.clk(clk), .rst(rst), .ctrl(ctrl), .a(a), .b(b),
                                 .status(status), .z(z));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s at %0t x=%0d", what, $time, dut.x);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x_ref, y_ref, z_ref, op;
    rst  = 1'b1;
    ctrl = '0;
    a = '0;
    b = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    x_ref = 0; y_ref = 0; z_ref = 0;
    for (int i = 0; i < 3000; i++) begin
      op = $urandom % 5;
      ctrl = '0;
      case (op)
        0: ctrl.ld_x = 1'b1;
        1: ctrl.add_y = 1'b1;
        2: ctrl.dec_x = 1'b1;
        3: ctrl.ld_z = 1'b1;
        default: ;
      endcase
      // small operands now and then so that X reaches zero often
      a = ($urandom % 4 == 0) ? W'($urandom % 3) : W'($urandom);
      b = W'($urandom);
      #1;
      check(status[STAT_A] == (x_ref == 0), "status A = (X == 0)");
      check(status[STAT_B] == x_ref[0], "status B = X odd");
      if (x_ref == 0) a_zero_seen++;
      if (x_ref[0]) b_odd_seen++;
      case (op)
        0: begin x_ref = int'(a); y_ref = 0; end
        1: y_ref = (y_ref + int'(b)) % (1 << W);
        2: x_ref = (x_ref + (1 << W) - 1) % (1 << W);
        3: z_ref = y_ref;
        default: ;
      endcase
      @(posedge clk);
      #1 check(int'(z) == z_ref, "output register Z");
    end
    check(a_zero_seen > 0 && b_odd_seen > 0, "both status bits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
