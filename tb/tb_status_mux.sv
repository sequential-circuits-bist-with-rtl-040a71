// tb_status_mux: self-checking testbench of the status-bit multiplexer. All
// combinations of mode, datapath status and mask are applied; the FSM must
// see the datapath status in working mode and the mask in test mode, and the
// observation points must always carry the datapath status.
module tb_status_mux;

  logic tm;
  logic [1:0] dp_status, mask, fsm_status, obs;
  int checks = 0, failures = 0;

  status_mux dut (.tm(tm), .dp_status(dp_status), .mask(mask),
                  .fsm_status(fsm_status), .obs(obs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {tm, dp_status, mask} = 5'(i);
      #1;
      checks += 2;
      if (fsm_status !== (tm ? mask : dp_status)) begin
        failures++;
        $display("FAIL fsm_status: tm=%b dp=%b mask=%b got=%b", tm, dp_status, mask, fsm_status);
      end
      if (obs !== dp_status) begin
        failures++;
        $display("FAIL obs: tm=%b dp=%b got=%b", tm, dp_status, obs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
