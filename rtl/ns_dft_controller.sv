// ns_dft_controller: non-scan delay-testable controller (top level).
//
// The example controller (combinational part + state register SR with reset
// R) extended for at-speed delay testing without a scan chain:
//   * t_out  - the SR output is brought out, so the state captured by the SR
//              at the end of a two-pattern test can be read every cycle;
//   * ISTG   - invalid test state and transition generator, a truth table
//              that produces the second-vector state of each two-pattern
//              test the state graph cannot apply by itself;
//   * MUX    - selects the SR input: combinational next state (t_mode = 0,
//              normal mode) or ISTG output (t_mode = 1, test mode);
//   * t_sel  - picks among ISTG rows that share a first vector.
// Tests the state graph can apply (valid two-pattern tests) run in normal
// mode with ordinary inputs. An invalid test (I1&S1, I2&S2) takes two cycles:
// with SR = S1, pi = I1 and t_mode = 1 the SR loads S2 from the ISTG; in the
// next cycle pi = I2, t_mode = 0 and the SR captures the controller's
// response, which appears on t_out one clock later. Every cycle runs at the
// rated clock; there is no shift phase.
//
// HAS_ISTG = 0 builds the reduced form for a controller whose every test can
// be applied through its own transitions: only t_out is added, with no MUX,
// no ISTG, and t_mode / t_sel unused (leaving them unconnected is then safe).
// POWER_AWARE = 1 adds AND gates that hold the ISTG inputs at zero while
// t_mode = 0 (the power-aware variant); the default, 0, is the plain
// architecture. The t_out value is also offered on the data-path output pins
// through tout_share_mux (obs = 0 passes the data path's own outputs
// dp_po_i); the data path itself is outside this design.
//
// Timing: one clock domain, all state in the SR, synchronous active-high
// reset. pi, t_mode and t_sel are sampled at the rising edge; po, dp_po_o and
// t_out depend on the SR and the current inputs.
module ns_dft_controller
  import ns_dft_pkg::*;
#(
  parameter int unsigned                   TSEL_W  = EX_ISTG_SEL_W,
  parameter int unsigned                   N_ISTG  = EX_ISTG_N,
  parameter logic [N_ISTG-1:0][PI_W-1:0]   ISTG_I1  = EX_ISTG_I1,
  parameter logic [N_ISTG-1:0][SR_W-1:0]   ISTG_S1  = EX_ISTG_S1,
  parameter logic [N_ISTG-1:0][TSEL_W-1:0] ISTG_SEL = EX_ISTG_SEL,
  parameter logic [N_ISTG-1:0][SR_W-1:0]   ISTG_S2  = EX_ISTG_S2,
  parameter bit                            HAS_ISTG    = 1'b1,
  parameter bit                            POWER_AWARE = 1'b0,
  parameter int unsigned                   DPO_W   = 4,
  localparam int unsigned                  NB      = (SR_W + DPO_W - 1) / DPO_W
) (
  input  logic              clk,
  input  logic              rst,      // R: synchronous reset to s0
  input  logic [PI_W-1:0]   pi,       // primary inputs
  output logic [PO_W-1:0]   po,       // primary outputs
  input  logic              t_mode,   // 0: normal mode, 1: test mode (SR <- ISTG)
  input  logic [TSEL_W-1:0] t_sel,    // ISTG row select
  output logic [SR_W-1:0]   t_out,    // SR value
  input  logic [DPO_W-1:0]  dp_po_i,  // data-path outputs
  input  logic [NB-1:0]     obs,      // show t_out batch b on dp_po_o
  output logic [DPO_W-1:0]  dp_po_o   // shared data-path output pins
);

  logic [SR_W-1:0] sr_q, comb_ns, istg_s2, sr_d;
  logic [PI_W-1:0] istg_pi;
  logic [SR_W-1:0] istg_sr;
  logic            istg_hit;

  example_ctrl_comb u_comb (
    .pi (pi),
    .ps (sr_q),
    .ns (comb_ns),
    .po (po)
  );

  generate
    if (HAS_ISTG) begin : g_istg
        if (POWER_AWARE) begin : g_gate
          istg_input_gate #(.I_W(PI_W), .S_W(SR_W)) u_gate (
            .t_mode (t_mode),
            .pi     (pi),
            .sr     (sr_q),
            .pi_g   (istg_pi),
            .sr_g   (istg_sr)
          );
        end else begin : g_nogate
          assign istg_pi = pi;
          assign istg_sr = sr_q;
        end

      istg #(
        .I_W   (PI_W),
        .S_W   (SR_W),
        .SEL_W (TSEL_W),
        .N     (N_ISTG),
        .T_I1  (ISTG_I1),
        .T_S1  (ISTG_S1),
        .T_SEL (ISTG_SEL),
        .T_S2  (ISTG_S2),
        .NO_MATCH_S2 (RESET_STATE)
      ) u_istg (
        .pi    (istg_pi),
        .sr    (istg_sr),
        .t_sel (t_sel),
        .s2    (istg_s2),
        .hit   (istg_hit)
      );

      sr_input_mux #(.W(SR_W)) u_mux (
        .t_mode (t_mode),
        .in0    (comb_ns),
        .in1    (istg_s2),
        .y      (sr_d)
      );

      // istg_hit is used only by the check below: in test mode the tester is
      // expected to present the first vector of one of the ISTG's tests.
      always_ff @(posedge clk) begin
        if (!rst && t_mode)
          a_istg_row: assert (istg_hit)
            else $warning("ns_dft_controller: test mode with no matching ISTG row (pi=%b sr=%0d)", pi, sr_q);
      end
    end else begin : g_tout_only
      // Only t_out is added: the state register is fed by the controller
      // alone and t_mode / t_sel have no effect.
      assign istg_pi  = '0;
      assign istg_sr  = '0;
      assign istg_s2  = '0;
      assign istg_hit = 1'b0;
      assign sr_d     = comb_ns;
    end
  endgenerate

  state_register #(.W(SR_W), .RESET_VAL(RESET_STATE)) u_sr (
    .clk (clk),
    .rst (rst),
    .d   (sr_d),
    .q   (sr_q)
  );

  assign t_out = sr_q;

  tout_share_mux #(.TOUT_W(SR_W), .DPO_W(DPO_W)) u_share (
    .dp_po (dp_po_i),
    .t_out (sr_q),
    .obs   (obs),
    .pin   (dp_po_o)
  );

endmodule
