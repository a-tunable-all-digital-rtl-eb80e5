// pvt_clock_gen: PVT-tolerant all-digital 5 MHz clock source.
//
// Replaces a crystal oscillator as the reference clock. A free ring
// oscillator in a deep-submicron process can drift by tens of percent over
// process, voltage and temperature; here the operating point is measured
// instead and the ring length is chosen to match it:
//   1. pvt_detector: a step runs through 84 pairs of delay lines made of two
//      cell types with different PVT sensitivity; the lead/lag pattern is a
//      thermometer code of their delay ratio R.
//   2. pvt_encoder: the thermometer code becomes an interval index.
//   3. mapper: the interval is mapped through the process-calibrated
//      quadratic a''R^2 + b''R + c''' plus the tuning step d to the
//      oscillator codeword.
//   4. osc_encoder + osc_ring + clk_div8: the codeword selects the ring tap,
//      and the ring output is divided by 8.
// Without tuning the frequency error stays within about 2 %; the tuning step
// d from the system's frequency recovery loop trims it further.
//
// Sequencing (this design's choice): the detector's enable is
// rst_n AND NOT retrack_i, so detection runs once after reset and again on a
// re-track command; the ring is held stopped until the detector reports done
// (under 100 ns), and the result is held until the next re-track.
//
// The cell-delay parameters describe the operating point for simulation.
//
// Lint note: the detector's DOWN flags are left unconnected on purpose; the
// encoder counts the UP flags only, and a pair without UP is a DOWN pair.
`timescale 1ns / 1fs
module pvt_clock_gen #(
  parameter int unsigned N_PAIRS    = 84,
  parameter int unsigned N_REF      = 82,
  parameter int unsigned N_VAR_MIN  = 292,
  parameter int unsigned CW_BITS    = 11,
  parameter int unsigned D_BITS     = 12,
  parameter real         D_ND_NS    = 0.36,
  parameter real         D_BUF_NS   = 0.09,
  parameter real         T_CELL_NS  = 0.02,
  parameter real         T_FIXED_NS = 0.2,
  parameter int unsigned IW         = $clog2(N_PAIRS + 1)
) (
  input  logic                     rst_n,
  input  logic                     retrack_i,
  input  logic signed [31:0]       coef_a_i,
  input  logic signed [31:0]       coef_b_i,
  input  logic signed [31:0]       coef_c_i,
  input  logic signed [D_BITS-1:0] tune_d_i,
  output logic                     clk_o,
  output logic [CW_BITS-1:0]       codeword_o,
  output logic [IW-1:0]            idx_o,
  output logic                     det_done_o
);

  localparam int unsigned N_TAPS = 1 << CW_BITS;

  logic               enable;
  logic [N_PAIRS-1:0] up, down;
  logic [N_TAPS-1:0]  on;
  logic               ring;

  assign enable = rst_n & ~retrack_i;

  pvt_detector #(.N_PAIRS(N_PAIRS), .N_REF(N_REF), .N_VAR_MIN(N_VAR_MIN),
                 .D_ND_NS(D_ND_NS), .D_BUF_NS(D_BUF_NS)) u_det (
    .enable_i (enable),
    .up_o     (up),
    .down_o   (down),
    .done_o   (det_done_o)
  );

  pvt_encoder #(.N_PAIRS(N_PAIRS), .IW(IW)) u_penc (
    .up_i  (up),
    .idx_o (idx_o)
  );

  mapper #(.N_PAIRS(N_PAIRS), .N_REF(N_REF), .N_VAR_MIN(N_VAR_MIN), .CW_BITS(CW_BITS),
           .IW(IW), .D_BITS(D_BITS)) u_map (
    .idx_i      (idx_o),
    .coef_a_i   (coef_a_i),
    .coef_b_i   (coef_b_i),
    .coef_c_i   (coef_c_i),
    .tune_d_i   (tune_d_i),
    .codeword_o (codeword_o)
  );

  osc_encoder #(.CW_BITS(CW_BITS), .N_TAPS(N_TAPS)) u_oenc (
    .codeword_i (codeword_o),
    .on_o       (on)
  );

  osc_ring #(.N_TAPS(N_TAPS), .T_CELL_NS(T_CELL_NS), .T_FIXED_NS(T_FIXED_NS)) u_ring (
    .rst_n  (det_done_o),
    .on_i   (on),
    .ring_o (ring)
  );

  clk_div8 u_div (
    .rst_n (rst_n),
    .clk_i (ring),
    .clk_o (clk_o)
  );

endmodule
