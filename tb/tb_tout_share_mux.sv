// tb_tout_share_mux: sharing of t_out with data-path output pins, for a data
// path with more pins than t_out has bits (one batch) and with fewer (two
// batches: t_out bits 1:0, then bit 2 with a zero above it). Random values,
// every batch selection and the pass-through of the data-path outputs.
module tb_tout_share_mux;
  logic [3:0] dp_a, pin_a;
  logic [2:0] tout;
  logic [0:0] obs_a;
  logic [1:0] dp_b, pin_b, obs_b;
  int checks = 0, failures = 0;

  tout_share_mux #(.TOUT_W(3), .DPO_W(4)) dut_a (.dp_po(dp_a), .t_out(tout), .obs(obs_a), .pin(pin_a));
  tout_share_mux #(.TOUT_W(3), .DPO_W(2)) dut_b (.dp_po(dp_b), .t_out(tout), .obs(obs_b), .pin(pin_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      dp_a = 4'($urandom); dp_b = 2'($urandom); tout = 3'($urandom);
      obs_a = 1'(i % 2);
      obs_b = (i % 3 == 0) ? 2'b00 : (i % 3 == 1) ? 2'b01 : 2'b10;
      #1;
      check(pin_a == (obs_a[0] ? {1'b0, tout} : dp_a),
            $sformatf("one batch: obs=%b t_out=%b dp=%b pin=%b", obs_a, tout, dp_a, pin_a));
      case (obs_b)
        2'b00: check(pin_b == dp_b, $sformatf("pass-through dp=%b pin=%b", dp_b, pin_b));
        2'b01: check(pin_b == tout[1:0], $sformatf("batch 0 t_out=%b pin=%b", tout, pin_b));
        default: check(pin_b == {1'b0, tout[2]}, $sformatf("batch 1 t_out=%b pin=%b", tout, pin_b));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
