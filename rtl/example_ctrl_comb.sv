// example_ctrl_comb: combinational part of the example controller.
//
// This is the block that remains when the state register is cut out of the
// controller (the combinational test generation model): present state and
// primary inputs in, next state and primary outputs out. Its state graph is
// the five-state example of the scheme:
//   s0 -> s1;  s1 -> s1 (x=0) or s2 (x=1);  s2 -> s0 (x=0) or s3 (x=1);
//   s3 -> s4;  s4 -> s0.
// Which input value selects which branch, and the outputs, are this design's
// choice: po[0] ("busy") is 1 in s1..s4, po[1] ("done") is 1 on the arcs that
// return to s0 (s2 with x=0, and s4). As a synthesizer may do with don't-care
// codes, the invalid codes 5..7 lead to s0 with both outputs 0; those arcs are
// the extra behaviour of the synthesized machine that the graph does not have.
//
// Purely combinational, no clock.
module example_ctrl_comb
  import ns_dft_pkg::*;
(
  input  logic [PI_W-1:0] pi,        // primary inputs (x)
  input  logic [SR_W-1:0] ps,        // present state (pseudo primary inputs)
  output logic [SR_W-1:0] ns,        // next state (pseudo primary outputs)
  output logic [PO_W-1:0] po         // primary outputs {done, busy}
);

  logic x;
  assign x = pi[0];

  always_comb begin
    ns = RESET_STATE;
    po = '0;
    unique case (ps)
      S0: ns = S1;
      S1: begin
        ns    = x ? S2 : S1;
        po[0] = 1'b1;
      end
      S2: begin
        ns    = x ? S3 : S0;
        po[0] = 1'b1;
        po[1] = ~x;
      end
      S3: begin
        ns    = S4;
        po[0] = 1'b1;
      end
      S4: begin
        ns    = S0;
        po    = 2'b11;
      end
      default: begin
        ns = RESET_STATE;
        po = '0;
      end
    endcase
  end

endmodule
