// istg: invalid test state and transition generator.
//
// A truth table with one row per invalid two-pattern test (I1&S1, I2&S2):
// when the primary inputs equal I1, the state register equals S1 and t_sel
// equals the row's select value, the output is S2. Loaded into the state
// register in test mode, this output makes the controller take a transition
// its state graph does not have, so that (a) the second vector I2&S2 can be
// applied on the next clock at speed and (b) invalid test states such as S2
// become reachable from reset by chaining such transitions. Several tests may
// share one first vector and differ in S2; t_sel then picks among them, and
// needs ceil(log2 m_max) bits for at most m_max such tests.
//
// The rows are parameters; their defaults are the four invalid tests of the
// example controller (see ns_dft_pkg). The table is assumed fully specified
// (no don't-care bits), as the scheme assumes. An input that matches no row is
// a don't-care for the scheme; this design then outputs NO_MATCH_S2 (the reset
// state). Rows are searched from 0 upwards and the first match wins, which only
// matters if two rows repeat the same inputs. Purely combinational; its delay
// adds to the test-mode path into the state register only.
module istg
  import ns_dft_pkg::*;
#(
  parameter int unsigned                   I_W   = PI_W,
  parameter int unsigned                   S_W   = SR_W,
  parameter int unsigned                   SEL_W = EX_ISTG_SEL_W,
  parameter int unsigned                   N     = EX_ISTG_N,
  parameter logic [N-1:0][I_W-1:0]         T_I1  = EX_ISTG_I1,
  parameter logic [N-1:0][S_W-1:0]         T_S1  = EX_ISTG_S1,
  parameter logic [N-1:0][SEL_W-1:0]       T_SEL = EX_ISTG_SEL,
  parameter logic [N-1:0][S_W-1:0]         T_S2  = EX_ISTG_S2,
  parameter logic [S_W-1:0]                NO_MATCH_S2 = '0
) (
  input  logic [I_W-1:0]   pi,     // primary inputs (first vector I1)
  input  logic [S_W-1:0]   sr,     // state register value (first vector S1)
  input  logic [SEL_W-1:0] t_sel,  // test select pins
  output logic [S_W-1:0]   s2,     // state for the second vector
  output logic             hit     // a table row matched
);

  always_comb begin
    s2  = NO_MATCH_S2;
    hit = 1'b0;
    for (int unsigned r = 0; r < N; r++) begin
      if (!hit && pi == T_I1[r] && sr == T_S1[r] && t_sel == T_SEL[r]) begin
        s2  = T_S2[r];
        hit = 1'b1;
      end
    end
  end

endmodule
