// state_register: the controller's state register (SR) with reset signal R.
//
// Loads d on every rising clock edge. Asserting rst (R) moves the register to
// RESET_VAL at the next edge, from any state, in one clock cycle; the scheme
// counts this one-cycle reset transition when it orders tests. The reset is
// synchronous and active high: the scheme requires only that a reset
// transition exists, the polarity and timing are this design's choice.
module state_register #(
  parameter int unsigned     W         = 3,
  parameter logic [W-1:0]    RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,   // R: synchronous, active high
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= RESET_VAL;
    else     q <= d;
  end

endmodule
