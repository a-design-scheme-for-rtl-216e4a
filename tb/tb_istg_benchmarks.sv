// tb_istg_benchmarks: ISTGs at the sizes the benchmark controllers need.
//
// For each benchmark controller that needed invalid two-pattern tests, an ISTG
// with its number of primary inputs and state bits and one row per invalid
// two-pattern test (bbsse 7/4/2, planet 7/6/19, s298 3/8/112, sand 11/5/2,
// scf 27/7/8; inputs/state bits/tests). s298 is the one case with a 1-bit
// t_sel; its rows are generated in pairs sharing a first vector. The tests
// themselves are not published, so the table contents are generated; what is
// exercised is the structure at those sizes: every row found, nothing else
// matched.
module tb_istg_benchmarks;

  localparam int NB = 5;
  logic done [NB];
  int   ch [NB], fl [NB];
  int   checks = 0, failures = 0;

  tb_istg_bench_unit #(.I_W(7),  .S_W(4), .SEL_W(1), .PAIRS(1'b0), .N(2),   .SEED(11)) u_bbsse  (.done(done[0]), .checks(ch[0]), .failures(fl[0]));
  tb_istg_bench_unit #(.I_W(7),  .S_W(6), .SEL_W(1), .PAIRS(1'b0), .N(19),  .SEED(23)) u_planet (.done(done[1]), .checks(ch[1]), .failures(fl[1]));
  tb_istg_bench_unit #(.I_W(3),  .S_W(8), .SEL_W(1), .PAIRS(1'b1), .N(112), .SEED(37)) u_s298   (.done(done[2]), .checks(ch[2]), .failures(fl[2]));
  tb_istg_bench_unit #(.I_W(11), .S_W(5), .SEL_W(1), .PAIRS(1'b0), .N(2),   .SEED(41)) u_sand   (.done(done[3]), .checks(ch[3]), .failures(fl[3]));
  tb_istg_bench_unit #(.I_W(27), .S_W(7), .SEL_W(1), .PAIRS(1'b0), .N(8),   .SEED(53)) u_scf    (.done(done[4]), .checks(ch[4]), .failures(fl[4]));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < NB; i++) begin
      checks   += ch[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
