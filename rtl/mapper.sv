// mapper: delay-ratio interval to oscillator codeword.
//
// For a fixed process corner the oscillator codeword needed for the target
// frequency is close to a second-order function of the delay ratio R:
//     codeword = a''*R^2 + b''*R + c''' + d,
// with the process coefficients a'', b'', c''' measured at chip test (kept
// in one-time-programmable storage) and d the frequency tuning step from the
// system's frequency recovery loop. The detector only tells which of its
// intervals R lies in, so each interval is mapped to one value: the mean of
// the quadratic at the two interval ends (the "partition" value).
//
// Interval k lies between the detector thresholds R_k and R_(k-1), with
// R_i = N_REF / (N_VAR_MIN + i) held as unsigned fixed point with R_FRAC
// fraction bits (a constant table). k = 0 and k = N_PAIRS (R outside the
// detector range) use the first and last interval. Arithmetic:
//     S  = a*(Rlo^2 + Rhi^2) + b*(Rlo + Rhi)*2^F + c*2^(2F+1)   (F = R_FRAC)
//     cw = round(S / 2^(2F+1)) + d, saturated to 0 .. 2^CW_BITS-1,
// i.e. a'' and b'' are integers in codeword units per unit R^2 and per unit
// R. The formula and the averaging follow the partition rule; the fixed-point
// formats and the out-of-range handling are this design's choices.
// Purely combinational.
`timescale 1ns / 1fs
module mapper #(
  parameter int unsigned N_PAIRS   = 84,
  parameter int unsigned N_REF     = 82,
  parameter int unsigned N_VAR_MIN = 292,
  parameter int unsigned CW_BITS   = 11,
  parameter int unsigned R_FRAC    = 16,
  parameter int unsigned IW        = $clog2(N_PAIRS + 1),
  parameter int unsigned D_BITS    = 12
) (
  input  logic [IW-1:0]            idx_i,
  input  logic signed [31:0]       coef_a_i,
  input  logic signed [31:0]       coef_b_i,
  input  logic signed [31:0]       coef_c_i,
  input  logic signed [D_BITS-1:0] tune_d_i,
  output logic [CW_BITS-1:0]       codeword_o
);

  localparam int unsigned SW = 2 * R_FRAC + 40;   // width of the sum S

  // Threshold table R_i in Q0.R_FRAC, rounded.
  logic [R_FRAC-1:0] rtab [N_PAIRS];
  for (genvar i = 0; i < N_PAIRS; i++) begin : g_tab
    localparam longint unsigned NUM = longint'(N_REF) << R_FRAC;
    localparam longint unsigned DEN = longint'(N_VAR_MIN) + longint'(i);
    assign rtab[i] = R_FRAC'((NUM + DEN / 2) / DEN);
  end

  logic [IW-1:0]       k;
  logic [R_FRAC-1:0]   r_lo, r_hi;
  logic signed [SW-1:0] s, sq, lin, cterm, cw_full;

  always_comb begin
    if (idx_i < IW'(1))             k = IW'(1);
    else if (idx_i > IW'(N_PAIRS-1)) k = IW'(N_PAIRS - 1);
    else                             k = idx_i;
    r_lo = rtab[k];
    r_hi = rtab[k - IW'(1)];
    sq    = SW'($signed({1'b0, r_lo}) * $signed({1'b0, r_lo}))
          + SW'($signed({1'b0, r_hi}) * $signed({1'b0, r_hi}));
    lin   = SW'($signed({1'b0, r_lo})) + SW'($signed({1'b0, r_hi}));
    cterm = SW'(coef_c_i) <<< (2 * R_FRAC + 1);
    s     = (SW'(coef_a_i) * sq) + ((SW'(coef_b_i) * lin) <<< R_FRAC) + cterm;
    cw_full = ((s + (SW'(1) <<< (2 * R_FRAC))) >>> (2 * R_FRAC + 1)) + SW'(tune_d_i);
    if (cw_full < 0)                              codeword_o = '0;
    else if (cw_full > SW'((1 << CW_BITS) - 1))   codeword_o = '1;
    else                                          codeword_o = cw_full[CW_BITS-1:0];
  end

endmodule
