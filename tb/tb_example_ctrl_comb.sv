// tb_example_ctrl_comb: exhaustive test of the example controller's
// combinational part. All 16 combinations of input x and present-state code
// are applied and next state and outputs are compared with the arc list of
// the reference package.
module tb_example_ctrl_comb;
  import ns_dft_pkg::*;
  import tb_ns_dft_ref_pkg::*;

  logic [PI_W-1:0] pi;
  logic [SR_W-1:0] ps, ns;
  logic [PO_W-1:0] po;
  int checks = 0, failures = 0;

  example_ctrl_comb dut (.pi, .ps, .ns, .po);

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arc_t a;
    for (int s = 0; s < 8; s++) begin
      for (int x = 0; x < 2; x++) begin
        pi = PI_W'(x);
        ps = SR_W'(s);
        #1;
        a = ref_arc(1'(x), 3'(s));
        checks++;
        if (ns !== a.n || po !== a.o) begin
          failures++;
          $display("FAIL: x=%0d ps=%0d -> ns=%0d po=%b, expected ns=%0d po=%b", x, s, ns, po, a.n, a.o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
