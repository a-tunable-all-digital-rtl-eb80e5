// hdc_cell: behavioural model of the delay-tunable hysteresis delay cell
// (HDC). Not synthesizable: a transistor-level cell modelled with delays.
//
// The cell is a Schmitt-trigger style inverter (an inverter chain with a
// footer and a header, so the output only switches once the input has
// crossed a high or low threshold). Its slow, low-current output edges give a
// long delay for very little power. Seven extra discharge transistors,
// switched by a 7-bit code, trim the pull-down strength and thus the delay.
// Logically the cell is an inverter.
//
// Model: each input edge appears inverted at the output after half the cell
// delay, where the cell delay (rise plus fall propagation) is
//     D = D0_NS + ctrl * RES_NS = 1.643 ns + ctrl * 0.78 ps,
// i.e. 1.643 ns to 1.742 ns over the code range, as specified. Treating the
// code as a binary number with a linear delay is this model's reading of the
// "monotonic, fine-linearity" delay curve. Edges are transport-delayed, so
// pulses shorter than the delay still pass.
//
// Lint note: the delay is worked out at run time from the control word, so
// lint cannot prove it non-zero; it is at least D0_NS / 2.
`timescale 1ns / 1fs
module hdc_cell #(
  parameter int unsigned CTRL_BITS = 7,
  parameter real         D0_NS     = 1.643,
  parameter real         RES_NS    = 0.00078
) (
  input  logic                 in_i,
  input  logic [CTRL_BITS-1:0] ctrl_i,
  output logic                 out_o
);

  always begin
    out_o <= #((D0_NS + real'(ctrl_i) * RES_NS) / 2.0) ~in_i;
    @(in_i);
  end

endmodule
