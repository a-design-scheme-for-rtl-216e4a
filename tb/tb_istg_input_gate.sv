// tb_istg_input_gate: with t_mode = 1 the primary inputs and state pass to
// the ISTG unchanged; with t_mode = 0 the ISTG sees all zeros. Exhaustive for
// a 2-bit input and 3-bit state.
module tb_istg_input_gate;
  logic t_mode;
  logic [1:0] pi, pi_g;
  logic [2:0] sr, sr_g;
  int checks = 0, failures = 0;

  istg_input_gate #(.I_W(2), .S_W(3)) dut (.t_mode, .pi, .sr, .pi_g, .sr_g);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 4; i++)
        for (int s = 0; s < 8; s++) begin
          t_mode = 1'(m); pi = 2'(i); sr = 3'(s);
          #1;
          checks++;
          if (pi_g !== (m ? 2'(i) : 2'd0) || sr_g !== (m ? 3'(s) : 3'd0)) begin
            failures++;
            $display("FAIL: t_mode=%0d pi=%0d sr=%0d -> %0d %0d", m, i, s, pi_g, sr_g);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
