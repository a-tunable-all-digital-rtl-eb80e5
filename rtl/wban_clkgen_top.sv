// wban_clkgen_top: the complete clock generation subsystem.
//
// What: the PVT tolerance clock generator makes the 5 MHz reference clock,
// which drives REF_CLK of the phase-selectable fine-tunable clock generator
// (PFTCG). The HDC-based low power DCO sits beside them with its own enable,
// code and output, as a stand-alone oscillator.
// How: pure structure, no logic of its own besides wiring.
//
// Interface:
//   rst_n                   system reset, active low. It starts the PVT
//                           detection, then the PFTCG locks on the clock
//                           that comes out of it.
//   retrack                 high: restart the PVT detection (the reference
//                           clock stops until the detector is done again).
//   coef_a/b/c, tune_d      process coefficients and fine step of the PVT
//                           clock generator (see mapper).
//   p_sel, tune_valid,
//   tune_code               PFTCG phase select and frequency tuning.
//   out_clk, phase, lock,
//   dco_code                PFTCG outputs.
//   ref_clk, pvt_codeword,
//   pvt_idx, pvt_done       PVT clock generator outputs.
//   clear_dco, up, down,
//   step, state, active     PFTCG internal status, brought out for test.
//   hdc_rst_n, hdc_code,
//   hdc_clk                 HDC DCO.
// Timing: everything follows the reference clock made by the PVT part; the
// PFTCG is held in reset while rst_n is low.
//
// Follows the design: the 5 MHz reference of the PFTCG is the output of the
// on-chip PVT tolerance clock generator, not a crystal. Own choices: the HDC
// DCO is left unconnected from the PFTCG (using it as the PFTCG's oscillator
// is a later step of the design, not worked out), and the status ports.
//
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only the disable condition of the
// PFTCG controller's assertions.
`timescale 1ns / 1fs
module wban_clkgen_top (
  input  logic               rst_n,
  input  logic               retrack,
  input  logic signed [31:0] coef_a,
  input  logic signed [31:0] coef_b,
  input  logic signed [31:0] coef_c,
  input  logic signed [11:0] tune_d,
  input  logic [2:0]         p_sel,
  input  logic               tune_valid,
  input  logic signed [7:0]  tune_code,
  output logic               out_clk,
  output logic [7:0]         phase,
  output logic               lock,
  output logic [15:0]        dco_code,
  output logic               clear_dco,
  output logic               up,
  output logic               down,
  output logic [15:0]        step,
  output logic [1:0]         state,
  output logic [7:0]         active,
  output logic               ref_clk,
  output logic [10:0]        pvt_codeword,
  output logic [6:0]         pvt_idx,
  output logic               pvt_done,
  input  logic               hdc_rst_n,
  input  logic [19:0]        hdc_code,
  output logic               hdc_clk
);

  pvt_clock_gen u_pvt (
    .rst_n      (rst_n),
    .retrack_i  (retrack),
    .coef_a_i   (coef_a),
    .coef_b_i   (coef_b),
    .coef_c_i   (coef_c),
    .tune_d_i   (tune_d),
    .clk_o      (ref_clk),
    .codeword_o (pvt_codeword),
    .idx_o      (pvt_idx),
    .det_done_o (pvt_done)
  );

  pftcg u_pftcg (
    .ref_clk    (ref_clk),
    .rst_n      (rst_n),
    .p_sel      (p_sel),
    .tune_valid (tune_valid),
    .tune_code  (tune_code),
    .out_clk    (out_clk),
    .phase      (phase),
    .lock       (lock),
    .dco_code   (dco_code),
    .clear_dco  (clear_dco),
    .up         (up),
    .down       (down),
    .step       (step),
    .state      (state),
    .active     (active)
  );

  hdc_dco u_hdc (
    .rst_n  (hdc_rst_n),
    .code_i (hdc_code),
    .clk_o  (hdc_clk)
  );

endmodule
