// tout_share_mux: sharing of the t_out observation pins with data-path outputs.
//
// When the controller is tested on its own, the primary outputs of the data
// path it controls can carry the state register value (t_out) instead of
// data. Each data-path output pin gets a MUX. If the data path has at least as
// many outputs as t_out has bits (DPO_W >= TOUT_W) one control pin obs[0]
// switches all of them. Otherwise t_out is shown in NB = ceil(TOUT_W/DPO_W)
// batches: obs[b] puts bits b*DPO_W .. b*DPO_W+DPO_W-1 of t_out on the pins
// (bits past the top of t_out read as 0), and the same two-pattern test is
// applied once per batch. With no obs bit set the data path drives its pins.
// At most one obs bit may be set; if several are, the lowest batch wins.
// The one-control-pin-per-batch arrangement follows the scheme's pin count;
// the batch order and the zero padding are this design's choice.
// Purely combinational.
module tout_share_mux #(
  parameter int unsigned TOUT_W = 3,
  parameter int unsigned DPO_W  = 4,
  localparam int unsigned NB    = (TOUT_W + DPO_W - 1) / DPO_W
) (
  input  logic [DPO_W-1:0]  dp_po,   // outputs of the data path
  input  logic [TOUT_W-1:0] t_out,   // state register value
  input  logic [NB-1:0]     obs,     // batch select pins, at most one set
  output logic [DPO_W-1:0]  pin      // shared output pins
);

  // t_out zero-padded to a whole number of batches.
  logic [NB*DPO_W-1:0] t_pad;
  assign t_pad = (NB*DPO_W)'(t_out);

  always_comb begin
    pin = dp_po;
    for (int b = NB - 1; b >= 0; b--) begin
      if (obs[b]) pin = t_pad[b*DPO_W +: DPO_W];
    end
  end

  // Rule of the control pins: at most one batch selected.
  always_comb begin
    a_obs_onehot0: assert ($onehot0(obs))
      else $error("tout_share_mux: more than one batch selected (obs=%b)", obs);
  end

endmodule
