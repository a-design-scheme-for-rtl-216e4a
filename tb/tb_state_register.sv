// tb_state_register: the state register loads its input every clock edge and
// goes to the reset value one clock edge after rst is raised, from any value.
// Random data and random resets, compared with a one-line model.
module tb_state_register;
  localparam int unsigned W = 3;
  localparam logic [W-1:0] RV = 3'd0;

  logic clk = 1'b0, rst;
  logic [W-1:0] d, q, m;
  int checks = 0, failures = 0, n_rst = 0;

  always #5 clk = ~clk;

  state_register #(.W(W), .RESET_VAL(RV)) dut (.clk, .rst, .d, .q);

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = 3'd5;
    @(posedge clk); #1;
    checks++;
    if (q !== RV) begin failures++; $display("FAIL: not reset"); end
    m = RV;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      rst = ($urandom_range(7) == 0);
      d   = W'($urandom);
      @(posedge clk); #1;
      if (rst) begin m = RV; n_rst++; end else m = d;
      checks++;
      if (q !== m) begin failures++; $display("FAIL: q=%0d expected %0d", q, m); end
    end
    checks++;
    if (n_rst == 0) begin failures++; $display("FAIL: no reset applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
