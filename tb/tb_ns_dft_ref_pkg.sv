// tb_ns_dft_ref_pkg: reference model and test plan used by the testbenches.
//
// The controller is modelled here as a list of arcs (input, present state,
// next state, outputs), the form in which a state graph is given, and is
// searched rather than decoded, so it shares no code with the RTL. The invalid
// tests are listed with both vectors (I1&S1, I2&S2). The test plan is the
// optimal order of the worked example, R -> t1 -> t2 -> t4 -> t3 -> t5 -> R,
// together with its distance matrix (minimum clock cycles from the state after
// one test to the first vector of the next; -1 when the second vector of one
// test is the first vector of the next, valid, test; R is reached by reset in
// one cycle).
package tb_ns_dft_ref_pkg;

  typedef struct packed {
    logic       x;
    logic [2:0] p;
    logic [2:0] n;
    logic [1:0] o;   // {done, busy}
  } arc_t;

  // Arcs of the example controller, plus the arcs the synthesized circuit adds
  // for the invalid codes 5..7 (to s0, outputs 0).
  localparam int NARCS = 16;
  localparam arc_t ARCS [NARCS] = '{
    '{1'b0, 3'd0, 3'd1, 2'b00}, '{1'b1, 3'd0, 3'd1, 2'b00},
    '{1'b0, 3'd1, 3'd1, 2'b01}, '{1'b1, 3'd1, 3'd2, 2'b01},
    '{1'b0, 3'd2, 3'd0, 2'b11}, '{1'b1, 3'd2, 3'd3, 2'b01},
    '{1'b0, 3'd3, 3'd4, 2'b01}, '{1'b1, 3'd3, 3'd4, 2'b01},
    '{1'b0, 3'd4, 3'd0, 2'b11}, '{1'b1, 3'd4, 3'd0, 2'b11},
    '{1'b0, 3'd5, 3'd0, 2'b00}, '{1'b1, 3'd5, 3'd0, 2'b00},
    '{1'b0, 3'd6, 3'd0, 2'b00}, '{1'b1, 3'd6, 3'd0, 2'b00},
    '{1'b0, 3'd7, 3'd0, 2'b00}, '{1'b1, 3'd7, 3'd0, 2'b00}
  };

  function automatic arc_t ref_arc(logic x, logic [2:0] p);
    foreach (ARCS[i]) if (ARCS[i].x == x && ARCS[i].p == p) return ARCS[i];
    return '0;
  endfunction

  // Two-pattern tests t1..t5 of the example (index 0..4).
  typedef struct packed {
    logic       valid;  // applied by the state graph itself
    logic       i1;
    logic [2:0] s1;
    logic       i2;
    logic [2:0] s2;
  } tpt_t;

  localparam tpt_t TESTS [5] = '{
    '{1'b1, 1'b1, 3'd2, 1'b0, 3'd3},   // t1: s2 -> s3 (valid)
    '{1'b0, 1'b0, 3'd4, 1'b1, 3'd2},   // t2: s4 -> s2
    '{1'b0, 1'b0, 3'd1, 1'b0, 3'd5},   // t3: s1 -> s5
    '{1'b0, 1'b1, 3'd6, 1'b0, 3'd1},   // t4: s6 -> s1
    '{1'b0, 1'b1, 3'd5, 1'b1, 3'd6}    // t5: s5 -> s6
  };

  // ISTG reference: second-vector state of the invalid test whose first vector
  // is (x, p); found = 0 if none.
  function automatic logic [3:0] ref_istg(logic x, logic [2:0] p);
    foreach (TESTS[i])
      if (!TESTS[i].valid && TESTS[i].i1 == x && TESTS[i].s1 == p)
        return {1'b1, TESTS[i].s2};
    return 4'b0000;
  endfunction

  // Distance matrix; index 0 = R, 1..5 = t1..t5.
  localparam int DIST [6][6] = '{
    '{ 0, 2, 4, 1, 3, 2},
    '{ 1, 0, 0, 2, 4, 3},
    '{ 1,-1, 0, 2, 4, 3},
    '{ 1, 3, 5, 0, 4, 3},
    '{ 1, 1, 3, 0, 0, 1},
    '{ 1, 3, 5, 2, 4, 0}
  };
  // Optimal order (indices into DIST).
  localparam int ORDER [7] = '{0, 1, 2, 4, 3, 5, 0};

  // Tester stimulus of that order, one entry per clock cycle: reset, input,
  // t_mode. Cycle 0 starts in the reset state.
  typedef struct packed {
    logic rst;
    logic x;
    logic t_mode;
  } stim_t;

  localparam int PLAN_LEN = 20;
  localparam stim_t PLAN [PLAN_LEN] = '{
    '{1'b0, 1'b1, 1'b0},  //  0 s0
    '{1'b0, 1'b1, 1'b0},  //  1 s1
    '{1'b0, 1'b1, 1'b0},  //  2 s2  t1 first vector
    '{1'b0, 1'b0, 1'b0},  //  3 s3  t1 second vector
    '{1'b0, 1'b0, 1'b1},  //  4 s4  t2 first vector (ISTG)
    '{1'b0, 1'b1, 1'b0},  //  5 s2  t2 second vector
    '{1'b1, 1'b0, 1'b0},  //  6 s3  reset
    '{1'b0, 1'b0, 1'b0},  //  7 s0
    '{1'b0, 1'b0, 1'b1},  //  8 s1  ISTG s1 -> s5
    '{1'b0, 1'b1, 1'b1},  //  9 s5  ISTG s5 -> s6
    '{1'b0, 1'b1, 1'b1},  // 10 s6  t4 first vector (ISTG)
    '{1'b0, 1'b0, 1'b0},  // 11 s1  t4 second vector
    '{1'b0, 1'b0, 1'b1},  // 12 s1  t3 first vector (ISTG)
    '{1'b0, 1'b0, 1'b0},  // 13 s5  t3 second vector
    '{1'b1, 1'b0, 1'b0},  // 14 ?   reset
    '{1'b0, 1'b0, 1'b0},  // 15 s0
    '{1'b0, 1'b0, 1'b1},  // 16 s1  ISTG s1 -> s5
    '{1'b0, 1'b1, 1'b1},  // 17 s5  t5 first vector (ISTG)
    '{1'b0, 1'b1, 1'b0},  // 18 s6  t5 second vector
    '{1'b1, 1'b0, 1'b0}   // 19 ?   reset, back to R at cycle 20
  };

endpackage
