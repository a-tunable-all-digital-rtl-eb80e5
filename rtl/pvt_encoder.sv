// pvt_encoder: thermometer code of the PVT detector to a ratio interval.
//
// Pair i of the detector reports UP when the delay ratio R is below
// 82 / (292 + i); the thresholds fall with i, so UP is set for pairs
// 0 .. k-1 and the count k places R in interval k, between the thresholds of
// pairs k and k-1. k = 0 and k = N_PAIRS mean R lies above or below the
// detector range. The count is a population count rather than the position of
// the first zero, so a single out-of-order bit moves the result by one only.
// Purely combinational.
`timescale 1ns / 1fs
module pvt_encoder #(
  parameter int unsigned N_PAIRS = 84,
  parameter int unsigned IW      = $clog2(N_PAIRS + 1)
) (
  input  logic [N_PAIRS-1:0] up_i,
  output logic [IW-1:0]      idx_o
);

  always_comb begin
    idx_o = '0;
    for (int i = 0; i < N_PAIRS; i++) idx_o = idx_o + IW'(up_i[i]);
  end

endmodule
