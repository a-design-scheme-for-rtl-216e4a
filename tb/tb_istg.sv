// tb_istg: the invalid test state and transition generator.
// Instance u_ex holds the example's four invalid tests (module defaults): every
// combination of input, state and t_sel is applied and compared with the list
// of tests in the reference package; a first vector that is no test must give
// the reset state with hit = 0. Instance u_sel holds a table in which two
// tests share one first vector (I1=1, S1=s3) and differ in S2, so the 1-bit
// t_sel must tell them apart.
module tb_istg;
  import tb_ns_dft_ref_pkg::*;

  logic       pi;
  logic [2:0] sr;
  logic       t_sel;
  logic [2:0] s2_ex, s2_sel;
  logic       hit_ex, hit_sel;
  int checks = 0, failures = 0;

  istg u_ex (.pi, .sr, .t_sel(1'b0), .s2(s2_ex), .hit(hit_ex));

  // rows: (1,s3,sel0)->s6, (1,s3,sel1)->s7, (0,s7,sel0)->s2
  istg #(
    .I_W(1), .S_W(3), .SEL_W(1), .N(3),
    .T_I1 ({1'b0, 1'b1, 1'b1}),
    .T_S1 ({3'd7, 3'd3, 3'd3}),
    .T_SEL({1'b0, 1'b1, 1'b0}),
    .T_S2 ({3'd2, 3'd7, 3'd6}),
    .NO_MATCH_S2(3'd0)
  ) u_sel (.pi, .sr, .t_sel, .s2(s2_sel), .hit(hit_sel));

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
    logic [3:0] r;
    logic [2:0] e;
    logic       h;
    for (int x = 0; x < 2; x++)
      for (int s = 0; s < 8; s++)
        for (int t = 0; t < 2; t++) begin
          pi = 1'(x); sr = 3'(s); t_sel = 1'(t);
          #1;
          r = ref_istg(1'(x), 3'(s));
          check(hit_ex == r[3] && s2_ex == (r[3] ? r[2:0] : 3'd0),
                $sformatf("example x=%0d s=%0d: s2=%0d hit=%b", x, s, s2_ex, hit_ex));
          h = 1'b1;
          if      (x == 1 && s == 3 && t == 0) e = 3'd6;
          else if (x == 1 && s == 3 && t == 1) e = 3'd7;
          else if (x == 0 && s == 7 && t == 0) e = 3'd2;
          else begin e = 3'd0; h = 1'b0; end
          check(hit_sel == h && s2_sel == e,
                $sformatf("t_sel table x=%0d s=%0d sel=%0d: s2=%0d hit=%b", x, s, t, s2_sel, hit_sel));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
