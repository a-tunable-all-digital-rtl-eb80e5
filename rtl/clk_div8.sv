// clk_div8: divide-by-8 of the oscillator ring output.
// A 3-bit counter on the rising edge of clk_i; its MSB is the output, so the
// divided clock has 50 % duty and rises on every eighth input rising edge.
// rst_n clears the counter asynchronously (output low). The counter form of
// the divider is this design's choice.
`timescale 1ns / 1fs
module clk_div8 (
  input  logic rst_n,
  input  logic clk_i,
  output logic clk_o
);

  logic [2:0] cnt;

  always_ff @(posedge clk_i or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 3'd1;
  end

  assign clk_o = cnt[2];

endmodule
