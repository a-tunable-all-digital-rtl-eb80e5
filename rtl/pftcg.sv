// pftcg: all-digital phase-frequency tunable clock generator (PFTCG).
//
// Produces a 5 MHz sampling clock whose phase can be chosen among eight
// (45 degree steps) and whose frequency can be trimmed in steps of about
// 43 ppm, so that a receiver can sample at the symbol rate at the best instant
// instead of oversampling, and cancel the sampling-clock frequency offset.
//
// Locking loop: the phase frequency detector (pfd) compares REF_CLK with
// PHASE0; the controller (pftcg_ctrl) searches the 16-bit DCO word with an
// adaptive step, clearing the oscillator ring and the detector at every
// update; the DCO encoder (dco_encoder) turns the word into the three
// tuning-stage controls of the 8-phase oscillator (mp_dco, a behavioural
// model). After LOCK the glitch-free multiplexer (gfcmux) passes the phase
// chosen by the timing error detector (p_sel), and the frequency error
// detector trims the word through tune_valid/tune_code.
//
// The ring runs only while rst_n is high and CLEAR_DCO is low; the detector
// is cleared while rst_n is low or CLEAR_PFD is high. DCO_SCALE multiplies
// every delay of the oscillator model (1.0 = typical corner); it stands for
// a slow or fast process/voltage/temperature corner in simulation and has no
// hardware meaning (own addition).
//
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only the disable condition of the
// controller's assertions.
`timescale 1ns / 1fs
module pftcg
  import clkgen_pkg::*;
#(
  parameter int unsigned TUNE_BITS = 8,
  parameter real         DCO_SCALE = 1.0
) (
  input  logic                        ref_clk,
  input  logic                        rst_n,
  input  logic [2:0]                  p_sel,
  input  logic                        tune_valid,
  input  logic signed [TUNE_BITS-1:0] tune_code,
  output logic                        out_clk,
  output logic [N_PHASES-1:0]         phase,
  output logic                        lock,
  output logic [CODE_BITS-1:0]        dco_code,
  output logic                        clear_dco,
  output logic                        up,
  output logic                        down,
  output logic [CODE_BITS-1:0]        step,
  output logic [1:0]                  state,
  output logic [N_PHASES-1:0]         active
);

  logic                 clear_pfd;
  ctrl_state_e          state_e;
  logic [N_ON1-1:0]     on1;
  logic [N_ON2-1:0]     on2;
  logic [N_ON3-1:0]     on3;

  pfd u_pfd (
    .ref_i   (ref_clk),
    .fb_i    (phase[0]),
    .clear_i (clear_pfd | ~rst_n),
    .up_o    (up),
    .down_o  (down)
  );

  pftcg_ctrl #(.TUNE_BITS(TUNE_BITS)) u_ctrl (
    .clk          (ref_clk),
    .rst_n        (rst_n),
    .up_i         (up),
    .down_i       (down),
    .tune_valid_i (tune_valid),
    .tune_code_i  (tune_code),
    .dco_code_o   (dco_code),
    .clear_dco_o  (clear_dco),
    .clear_pfd_o  (clear_pfd),
    .lock_o       (lock),
    .step_o       (step),
    .state_o      (state_e)
  );

  assign state = state_e;

  dco_encoder u_enc (
    .dco_code_i (dco_code_t'(dco_code)),
    .on1_o      (on1),
    .on2_o      (on2),
    .on3_o      (on3)
  );

  mp_dco #(
    .T_BASE_NS (60.0 * DCO_SCALE),
    .RES1_NS   (30.27 * DCO_SCALE),
    .RES2_NS   (1.0618 * DCO_SCALE),
    .RES3_NS   (0.0086 * DCO_SCALE)
  ) u_dco (
    .rst_n   (rst_n & ~clear_dco),
    .on1_i   (on1),
    .on2_i   (on2),
    .on3_i   (on3),
    .phase_o (phase)
  );

  gfcmux #(.N(N_PHASES)) u_mux (
    .rst_n    (rst_n),
    .clk_i    (phase),
    .sel_i    (p_sel),
    .clk_o    (out_clk),
    .active_o (active)
  );

endmodule
