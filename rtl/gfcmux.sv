// gfcmux: N-to-1 glitch-free clock multiplexer with select decoder.
//
// Switching a clock with a plain multiplexer can chop a high pulse or create
// a runt when the select changes at an arbitrary time. Here every source k
// has a flip-flop clocked on the falling edge of its own clock. Its D input
// is SELECTION[k] AND the inverted outputs (qb) of every other source's
// flip-flop, and its Q gates the source: t[k] = q[k] AND clk[k]; the output is
// the OR of all t[k]. When the select moves from source a to source b, q[a]
// falls at the next falling edge of clk a (so the last high pulse of a is
// never cut), and only then can q[b] rise, at the next falling edge of clk b,
// so the output is low between the two and then follows clk b from its next
// rising edge. The decoder turns the 3-bit phase code P into the one-hot
// SELECTION.
//
// The two-input cell (d0 = SELECT & qb1, d1 = !SELECT & qb0, falling-edge
// flip-flops, AND/OR output) follows the published 2-to-1 circuit; extending
// the feedback to all other sources is the general N-input form. A reduced
// feedback wiring for sequential phase stepping exists but its connections
// are not known here, so the full form is used.
//
// Interface: clk_i[N-1:0] source clocks, sel_i source number, rst_n clears
// all flip-flops asynchronously (output low until the selected source's next
// falling edge). active_o shows the flip-flop outputs q.
`timescale 1ns / 1fs
module gfcmux #(
  parameter int unsigned N  = 8,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic          rst_n,
  input  logic [N-1:0]  clk_i,
  input  logic [SW-1:0] sel_i,
  output logic          clk_o,
  output logic [N-1:0]  active_o
);

  logic [N-1:0] selection;  // decoder output
  logic [N-1:0] d, q;

  always_comb begin
    for (int k = 0; k < N; k++) selection[k] = (sel_i == SW'(k));
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      d[k] = selection[k];
      for (int j = 0; j < N; j++)
        if (j != k) d[k] = d[k] & ~q[j];
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_src
    logic qk;   // this source's falling-edge flip-flop
    always_ff @(negedge clk_i[k] or negedge rst_n) begin
      if (!rst_n) qk <= 1'b0;
      else        qk <= d[k];
    end
    assign q[k] = qk;
  end

  assign clk_o    = |(q & clk_i);
  assign active_o = q;

endmodule
