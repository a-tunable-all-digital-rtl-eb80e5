// osc_encoder: oscillator codeword to the tri-state tap enables.
//
// The clock oscillator's delay line is tapped after every cell by a
// tri-state buffer, and all buffers drive one return line back to the ring's
// NAND gate, so exactly one may be enabled. The encoder is a binary to
// one-hot decoder: ON[k] = (codeword == k) enables the tap after cell k.
// Purely combinational.
`timescale 1ns / 1fs
module osc_encoder #(
  parameter int unsigned CW_BITS = 11,
  parameter int unsigned N_TAPS  = 1 << CW_BITS
) (
  input  logic [CW_BITS-1:0] codeword_i,
  output logic [N_TAPS-1:0]  on_o
);

  always_comb begin
    on_o = '0;
    on_o[codeword_i] = 1'b1;
  end

endmodule
