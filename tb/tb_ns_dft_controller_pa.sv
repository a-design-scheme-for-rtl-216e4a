// tb_ns_dft_controller_pa: end-to-end test of the power-aware variant, with t_out
// observed in two batches over two data-path output pins: the test sequence is
// run once per batch and every test's response is rebuilt from the batches.
// Otherwise as
// tb_ns_dft_controller:
//
// Phase 1 applies the worked example's five two-pattern tests in the optimal
// order R -> t1 -> t2 -> t4 -> t3 -> t5 -> R, one rated-speed clock cycle per
// vector, and checks that the first and second vector of every test are
// present in the state register (seen on t_out) exactly at the cycles the
// distance matrix predicts, and that the whole sequence takes the predicted
// number of cycles. Phase 2 runs the controller in normal mode with random
// inputs and occasional resets; phase 3 mixes in test-mode cycles through the
// ISTG. Every cycle t_out, the primary outputs and the shared data-path pins
// are compared with an arc-list reference model. Each mechanism (normal
// transition, ISTG transition, reset, valid and invalid test, visit of an
// invalid state, t_out shown on the data-path pins, data-path pass-through)
// must occur at least once.
module tb_ns_dft_controller_pa;
  import ns_dft_pkg::*;
  import tb_ns_dft_ref_pkg::*;

  localparam int unsigned DPO_W = 2;   // fewer data-path outputs than t_out bits
  localparam int unsigned NB    = (SR_W + DPO_W - 1) / DPO_W;
  localparam bit          PA    = 1'b1;

  logic              clk = 1'b0;
  logic              rst;
  logic [PI_W-1:0]   pi;
  logic [PO_W-1:0]   po;
  logic              t_mode;
  logic [EX_ISTG_SEL_W-1:0] t_sel;
  logic [SR_W-1:0]   t_out;
  logic [DPO_W-1:0]  dp_po_i, dp_po_o;
  logic [NB-1:0]     obs;

  always #5 clk = ~clk;

  ns_dft_controller #(.POWER_AWARE(PA), .DPO_W(DPO_W)) dut (
    .clk, .rst, .pi, .po, .t_mode, .t_sel, .t_out, .dp_po_i, .obs, .dp_po_o
  );

  int checks = 0, failures = 0;
  int n_normal = 0, n_istg = 0, n_reset = 0, n_valid_tests = 0, n_invalid_tests = 0;
  int n_invalid_state = 0, n_share_obs = 0, n_share_pass = 0, n_gated = 0;
  int n_batch_rebuilt = 0;
  int obs_hold = -1;                       // >= 0: batch to show instead of a random one
  logic [NB*DPO_W-1:0] seen [6];           // responses rebuilt from batches, per test
  logic [SR_W-1:0] ms;  // model state

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fcyc [6];
  int endc;

  // Checks of the test plan at plan cycle c: the first and second vector of
  // each test must be present at the cycles the distance matrix predicts.
  task automatic plan_check(input int c);
    for (int t = 1; t < 6; t++) begin
      if (c == fcyc[t]) begin
        // first vector present: state S1, input I1
        check(t_out == TESTS[t-1].s1 && PLAN[c].x == TESTS[t-1].i1 && !PLAN[c].rst,
              $sformatf("t%0d first vector not at cycle %0d (t_out=%0d)", t, c, t_out));
        check(PLAN[c].t_mode == !TESTS[t-1].valid,
              $sformatf("t%0d: t_mode %b at first vector", t, PLAN[c].t_mode));
        if (TESTS[t-1].valid) n_valid_tests++; else n_invalid_tests++;
      end
      if (c == fcyc[t] + 1) begin
        // second vector present: state S2, input I2, normal-mode capture
        check(t_out == TESTS[t-1].s2 && PLAN[c].x == TESTS[t-1].i2 && !PLAN[c].t_mode,
              $sformatf("t%0d second vector not at cycle %0d (t_out=%0d)", t, c, t_out));
      end
    end
  endtask

  // One clock cycle: drive stimulus after the falling edge, check outputs,
  // advance the model at the rising edge.
  task automatic cycle(input logic r, input logic x, input logic m, input int c);
    arc_t       a;
    logic [3:0] ig;
    logic [DPO_W-1:0] exp_pin;
    logic [NB*DPO_W-1:0] pad;
    int b;
    @(negedge clk);
    rst     = r;
    pi      = x;
    t_mode  = m;
    t_sel   = '0;
    dp_po_i = DPO_W'($urandom);
    b       = (obs_hold >= 0) ? obs_hold : int'($urandom_range(NB));  // NB = none selected
    obs     = (b == NB) ? '0 : NB'(1) << b;
    #1;
    a = ref_arc(x, ms);
    if (c >= 0) plan_check(c);
    check(t_out == ms, $sformatf("t_out=%0d expected %0d", t_out, ms));
    check(po == a.o, $sformatf("po=%b expected %b (state %0d, x=%b)", po, a.o, ms, x));
    pad = (NB*DPO_W)'(ms);
    exp_pin = (b == NB) ? dp_po_i : pad[b*DPO_W +: DPO_W];
    check(dp_po_o == exp_pin, $sformatf("dp_po_o=%b expected %b", dp_po_o, exp_pin));
    if (b == NB) n_share_pass++; else n_share_obs++;
    if (PA && !m && (ms != 0 || x != 0)) begin
      check(dut.istg_pi == '0 && dut.istg_sr == '0, "ISTG inputs not gated in normal mode");
      n_gated++;
    end
    if (ms >= 5) n_invalid_state++;
    ig = ref_istg(x, ms);
    if (r) begin
      ms = RESET_STATE; n_reset++;
    end else if (m) begin
      check(ig[3], "test mode without an ISTG row");
      ms = ig[2:0]; n_istg++;
    end else begin
      ms = a.n; n_normal++;
    end
    @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; pi = '0; t_mode = 1'b0; t_sel = '0; dp_po_i = '0; obs = '0;
    @(posedge clk);
    @(posedge clk);
    ms = RESET_STATE;

    // ---- Phase 1: the example's test sequence, checked against the distance matrix.
    endc = 0;
    for (int k = 1; k < 6; k++) begin
      fcyc[ORDER[k]] = endc + DIST[ORDER[k-1]][ORDER[k]];
      endc = fcyc[ORDER[k]] + 2;
    end
    endc = endc + DIST[ORDER[5]][0];
    check(endc == PLAN_LEN, $sformatf("sequence length %0d, plan has %0d", endc, PLAN_LEN));
    for (int c = 0; c < PLAN_LEN; c++) begin
      cycle(PLAN[c].rst, PLAN[c].x, PLAN[c].t_mode, c);
    end
    @(negedge clk); #1;
    check(t_out == RESET_STATE, "sequence does not end in the reset state");

    // ---- Phase 1b: t_out has more bits than there are shared pins, so the
    // whole sequence is applied once per batch; each run shows one batch of
    // every test's response on the shared pins, and the batches are joined.
    for (int t = 1; t < 6; t++) seen[t] = '0;
    for (int bb = 0; bb < int'(NB); bb++) begin
      cycle(1'b1, 1'b0, 1'b0, -1);          // back to R
      obs_hold = bb;
      for (int c = 0; c < PLAN_LEN; c++) begin
        cycle(PLAN[c].rst, PLAN[c].x, PLAN[c].t_mode, -1);
        for (int t = 1; t < 6; t++)
          if (c + 1 == fcyc[t] + 2) begin   // response of test t is now in the SR
            #1;
            seen[t][bb*DPO_W +: DPO_W] = dp_po_o;
          end
      end
      obs_hold = -1;
    end
    for (int t = 1; t < 6; t++) begin
      arc_t a2;
      a2 = ref_arc(TESTS[t-1].i2, TESTS[t-1].s2);
      check(seen[t] == (NB*DPO_W)'(a2.n),
            $sformatf("t%0d response rebuilt from %0d batches: %b, expected %0d", t, NB, seen[t], a2.n));
      n_batch_rebuilt++;
    end

    // ---- Phase 2: normal operation, random inputs, occasional reset.
    for (int i = 0; i < 400; i++)
      cycle($urandom_range(15) == 0, 1'($urandom), 1'b0, -1);

    // ---- Phase 3: normal operation mixed with ISTG transitions.
    for (int i = 0; i < 400; i++) begin
      logic x; logic [3:0] ig;
      x  = 1'($urandom);
      ig = ref_istg(x, ms);
      if (!ig[3]) begin
        x  = ~x;
        ig = ref_istg(x, ms);
      end
      cycle($urandom_range(31) == 0, x, ig[3] && $urandom_range(1) == 1, -1);
    end

    $display("mechanisms: normal=%0d istg=%0d reset=%0d valid_tests=%0d invalid_tests=%0d invalid_states=%0d share_obs=%0d share_pass=%0d gated=%0d",
             n_normal, n_istg, n_reset, n_valid_tests, n_invalid_tests, n_invalid_state,
             n_share_obs, n_share_pass, n_gated);
    check(n_normal > 0, "no normal-mode transition");
    check(n_istg > 0, "no ISTG transition");
    check(n_reset > 0, "no reset transition");
    check(n_valid_tests == 1, "valid test count");
    check(n_invalid_tests == 4, "invalid test count");
    check(n_invalid_state > 0, "no invalid state visited");
    check(n_share_obs > 0, "t_out never shown on data-path pins");
    check(n_share_pass > 0, "data-path outputs never passed");
    if (PA) check(n_gated > 0, "ISTG input gating never exercised");
    check(n_batch_rebuilt == 5, "responses not rebuilt from batches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
