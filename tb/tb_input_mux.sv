// tb_input_mux: self-checking testbench of the test-mode input multiplexer.
// Random normal inputs and pseudo-random patterns are applied in both modes
// and the output is compared with the input the mode selects.
module tb_input_mux;

  localparam int unsigned N = 16;
  logic tm;
  logic [N-1:0] pi, pr, y;
  int checks = 0, failures = 0;

  input_mux #(.N(N)) dut (.tm(tm), .pi(pi), .pr(pr), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      tm = 1'(i % 2);
      pi = N'($urandom);
      pr = N'($urandom);
      #1;
      checks++;
      if (y !== (tm ? pr : pi)) begin
        failures++;
        $display("FAIL: tm=%b pi=%h pr=%h y=%h", tm, pi, pr, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
