// tb_ns_dft_controller_tout_only: the reduced form (HAS_ISTG = 0) in which
// only t_out is added to the controller. The valid test t1 of the example is
// applied through the controller's own transitions and its response read on
// t_out; then 500 random cycles with random t_mode, t_sel and resets check
// that t_mode and t_sel have no effect and that t_out and po always follow
// the arc-list reference model.
module tb_ns_dft_controller_tout_only;
  import ns_dft_pkg::*;
  import tb_ns_dft_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic [PI_W-1:0]   pi;
  logic [PO_W-1:0]   po;
  logic              t_mode;
  logic [EX_ISTG_SEL_W-1:0] t_sel;
  logic [SR_W-1:0]   t_out;
  logic [3:0]        dp_po_i, dp_po_o;
  logic [0:0]        obs;

  always #5 clk = ~clk;

  ns_dft_controller #(.HAS_ISTG(1'b0)) dut (
    .clk, .rst, .pi, .po, .t_mode, .t_sel, .t_out, .dp_po_i, .obs, .dp_po_o
  );

  int checks = 0, failures = 0, n_mode_ignored = 0, n_reset = 0;
  logic [SR_W-1:0] ms;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic r, input logic x, input logic m);
    arc_t a;
    @(negedge clk);
    rst = r; pi = x; t_mode = m; t_sel = 1'($urandom); dp_po_i = 4'($urandom); obs = 1'($urandom);
    #1;
    a = ref_arc(x, ms);
    check(t_out == ms, $sformatf("t_out=%0d expected %0d", t_out, ms));
    check(po == a.o, $sformatf("po=%b expected %b", po, a.o));
    check(dp_po_o == (obs[0] ? {1'b0, ms} : dp_po_i), "shared pins");
    if (m && !r && ref_istg(x, ms) != 4'b0000) n_mode_ignored++;
    if (r) begin ms = RESET_STATE; n_reset++; end else ms = a.n;
    @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; pi = '0; t_mode = 1'b0; t_sel = '0; dp_po_i = '0; obs = '0;
    @(posedge clk); @(posedge clk);
    ms = RESET_STATE;
    // valid test t1: s0 -> s1 -> s2 (first vector x=1), s3 (second vector x=0), capture s4
    cycle(1'b0, 1'b1, 1'b0);
    cycle(1'b0, 1'b1, 1'b0);
    #1 check(t_out == TESTS[0].s1, "t1 first vector state");
    cycle(1'b0, TESTS[0].i1, 1'b0);
    #1 check(t_out == TESTS[0].s2, "t1 second vector state");
    cycle(1'b0, TESTS[0].i2, 1'b0);
    #1 check(t_out == 3'd4, "t1 response on t_out");
    for (int i = 0; i < 500; i++)
      cycle($urandom_range(15) == 0, 1'($urandom), 1'($urandom));
    check(n_mode_ignored > 0, "t_mode never raised where an ISTG row would have matched");
    check(n_reset > 0, "no reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
