// ns_dft_pkg: shared types and constants of the non-scan delay-testable controller.
//
// It holds the example controller (a five-state STG s0..s4 with a reset to s0)
// and the invalid two-pattern tests of the worked example that the invalid test
// state and transition generator (ISTG) must apply. States use a plain binary
// code, s_i = i, so a 3-bit state register also has the unreachable (invalid)
// codes 5, 6 and 7; s5 and s6 are the invalid test states of the example.
//
// Taken from the scheme: the state graph, the binary state encoding, the reset
// state and the four invalid tests (s4->s2, s1->s5, s6->s1, s5->s6). Chosen
// here: one primary input bit, two primary output bits and the input values
// of every test, none of which the scheme prints.
package ns_dft_pkg;

  // Widths of the example controller.
  localparam int unsigned PI_W = 1;  // primary inputs
  localparam int unsigned PO_W = 2;  // primary outputs
  localparam int unsigned SR_W = 3;  // state register = width of t_out

  typedef enum logic [SR_W-1:0] {
    S0 = 3'd0,  // reset state
    S1 = 3'd1,
    S2 = 3'd2,
    S3 = 3'd3,
    S4 = 3'd4,
    S5 = 3'd5,  // invalid state (unreachable in normal operation)
    S6 = 3'd6,  // invalid state
    S7 = 3'd7   // invalid state
  } state_e;

  localparam state_e RESET_STATE = S0;

  // Invalid two-pattern tests of the example, one ISTG truth-table row each:
  // first vector (I1, S1) and t_sel select the second-vector state S2.
  //   row 0: t2  I1=0 S1=s4 -> S2=s2
  //   row 1: t3  I1=0 S1=s1 -> S2=s5
  //   row 2: t4  I1=1 S1=s6 -> S2=s1
  //   row 3: t5  I1=1 S1=s5 -> S2=s6
  localparam int unsigned EX_ISTG_N     = 4;
  localparam int unsigned EX_ISTG_SEL_W = 1;  // ceil(log2 m_max) = 0; one unused pin kept
  localparam logic [EX_ISTG_N-1:0][PI_W-1:0] EX_ISTG_I1 =
    {1'b1, 1'b1, 1'b0, 1'b0};
  localparam logic [EX_ISTG_N-1:0][SR_W-1:0] EX_ISTG_S1 =
    {3'd5, 3'd6, 3'd1, 3'd4};
  localparam logic [EX_ISTG_N-1:0][EX_ISTG_SEL_W-1:0] EX_ISTG_SEL =
    {1'b0, 1'b0, 1'b0, 1'b0};
  localparam logic [EX_ISTG_N-1:0][SR_W-1:0] EX_ISTG_S2 =
    {3'd6, 3'd1, 3'd5, 3'd2};

endpackage
