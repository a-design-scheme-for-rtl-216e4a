// tb_sr_input_mux: the state register input multiplexer passes the
// combinational next state when t_mode = 0 and the ISTG output when
// t_mode = 1. Exhaustive over both 3-bit inputs and t_mode.
module tb_sr_input_mux;
  localparam int unsigned W = 3;
  logic t_mode;
  logic [W-1:0] in0, in1, y;
  int checks = 0, failures = 0;

  sr_input_mux #(.W(W)) dut (.t_mode, .in0, .in1, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          t_mode = 1'(m); in0 = W'(a); in1 = W'(b);
          #1;
          checks++;
          if (y !== (m ? W'(b) : W'(a))) begin
            failures++;
            $display("FAIL: t_mode=%0d in0=%0d in1=%0d y=%0d", m, a, b, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
