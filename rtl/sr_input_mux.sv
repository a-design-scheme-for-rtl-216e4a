// sr_input_mux: the multiplexer in front of the state register.
//
// With t_mode = 0 (normal mode) the state register is fed by the next state
// of the controller's combinational part (input 0); with t_mode = 1 (test
// mode) it is fed by the ISTG (input 1). Purely combinational. The tester may
// change t_mode from one clock cycle to the next, so an invalid transition
// taken through the ISTG can be followed at once, at the rated clock, by a
// normal-mode capture cycle.
module sr_input_mux #(
  parameter int unsigned W = 3
) (
  input  logic         t_mode,
  input  logic [W-1:0] in0,   // from the combinational part
  input  logic [W-1:0] in1,   // from the ISTG
  output logic [W-1:0] y
);

  always_comb y = t_mode ? in1 : in0;

endmodule
