// pvt_detector: behavioural model of the PVT detector. Not synthesizable:
// the delay lines are analog timing and are modelled with delays; the
// detector in each pair is the synthesizable pfd.
//
// Two standard cells with different sensitivity to process, voltage and
// temperature give a delay ratio R = D_BUF / D_ND that moves with the
// operating point, and the ratio, once the process corner is known, maps to
// the absolute delay. To measure R, a step on enable_i runs through N_PAIRS
// pairs of lines. In every pair the reference line has N_REF = 82 slow cells
// (a 4-input NAND loaded by another one, delay D_ND_NS per cell); the other
// line of pair i has N_VAR_MIN + i = 292 .. 375 fast buffer cells (D_BUF_NS
// per cell). A phase frequency detector per pair reports UP when the buffer
// line arrived first, which happens exactly when R < 82 / (292 + i). The UP
// vector is therefore a thermometer code of R with 84 thresholds.
//
// Line lengths and pair count are the specified ones. The cell delays are
// model parameters describing one operating point: D_BUF_NS defaults to the
// typical-corner buffer delay (0.090 ns) and D_ND_NS to 0.36 ns, which puts R
// at 0.25 in the middle of the detector range.
//
// enable_i low clears all detectors; done_o rises once every line has
// delivered the enable edge (well under 100 ns) and falls with enable_i.
`timescale 1ns / 1fs
module pvt_detector #(
  parameter int unsigned N_PAIRS   = 84,
  parameter int unsigned N_REF     = 82,
  parameter int unsigned N_VAR_MIN = 292,
  parameter real         D_ND_NS   = 0.36,
  parameter real         D_BUF_NS  = 0.09
) (
  input  logic               enable_i,
  output logic [N_PAIRS-1:0] up_o,
  output logic [N_PAIRS-1:0] down_o,
  output logic               done_o
);

  logic [N_PAIRS-1:0] ref_line, var_line;

  for (genvar i = 0; i < N_PAIRS; i++) begin : g_pair
    always begin
      ref_line[i] <= #(real'(N_REF) * D_ND_NS) enable_i;
      @(enable_i);
    end
    always begin
      var_line[i] <= #(real'(N_VAR_MIN + i) * D_BUF_NS) enable_i;
      @(enable_i);
    end
    pfd u_pfd (
      .ref_i   (ref_line[i]),
      .fb_i    (var_line[i]),
      .clear_i (~enable_i),
      .up_o    (up_o[i]),
      .down_o  (down_o[i])
    );
  end

  assign done_o = enable_i & (&ref_line) & (&var_line);

endmodule
