// istg_input_gate: input gating of the power-aware configuration.
//
// AND gates between the controller and the ISTG: with t_mode = 1 the primary
// inputs and the state register value pass to the ISTG unchanged; with
// t_mode = 0 (normal operation) the ISTG sees constant zeros, so its logic does
// not toggle and draws no switching power while the controller runs normally.
// Purely combinational.
module istg_input_gate #(
  parameter int unsigned I_W = 1,
  parameter int unsigned S_W = 3
) (
  input  logic           t_mode,
  input  logic [I_W-1:0] pi,
  input  logic [S_W-1:0] sr,
  output logic [I_W-1:0] pi_g,
  output logic [S_W-1:0] sr_g
);

  assign pi_g = pi & {I_W{t_mode}};
  assign sr_g = sr & {S_W{t_mode}};

endmodule
