// hdc_dco: behavioural model of the low-power digitally controlled oscillator
// built from hysteresis delay cells. Not synthesizable: a ring oscillator
// modelled with delays.
//
// A standard-cell DCO for a few MHz needs hundreds of nanoseconds of buffer
// chain, and every buffer burns switching power. Here the ring is made of
// hysteresis delay cells, each worth about 1.6 ns for about 2 uW:
//   * a NAND gate with rst_n on one input (rst_n low stops the ring),
//   * a 1st tuning stage: c1 coarse HDC elements of 3.246 ns each in the
//     loop (unused ones are isolated by an enable to save power; that has no
//     logic effect and is not modelled),
//   * a 2nd tuning stage: N_HDC2 = 64 delay-tunable HDC cells (hdc_cell),
//     always in the loop, sharing the 13-bit fine word for 0.78 ps steps.
// Control word: code_i = {c1 (7 bits), fine (13 bits)}, 20 bits in all.
// Period: T = 2*T_NAND_NS + c1*3.246 ns + sum of the 64 cell delays, from
// 106.8 ns (9.4 MHz) at word 0 to about 525.4 ns (1.9 MHz) at the top.
//
// The stage widths, cell count and step sizes follow the specification. The
// NAND delay is chosen so that word 0 gives 106.8 ns. How the 13-bit fine
// word is spread over the 64 cells is this design's choice: every cell gets
// fine/64 and the first fine%64 cells one more, each capped at 127, so the
// sum of cell codes equals the fine word up to 64*127 = 8128.
//
// rst_n low: the NAND output is forced high and the ring settles with clk_o
// high within about 60 ns; after rst_n rises clk_o falls after half a period
// and keeps oscillating.
//
// Lint note: the first-stage delay is worked out at run time from the code,
// so lint cannot prove it non-zero; with c1 = 0 it is zero on purpose (the
// stage is bypassed).
`timescale 1ns / 1fs
module hdc_dco #(
  parameter int unsigned C1_BITS    = 7,
  parameter int unsigned C2_BITS    = 13,
  parameter int unsigned N_HDC2     = 64,
  parameter int unsigned CTRL_BITS  = 7,
  parameter real         RES1_NS    = 3.246,
  parameter real         T_NAND_NS  = 0.824,
  parameter real         HDC_D0_NS  = 1.643,
  parameter real         HDC_RES_NS = 0.00078
) (
  input  logic                       rst_n,
  input  logic [C1_BITS+C2_BITS-1:0] code_i,
  output logic                       clk_o
);

  localparam int unsigned CTRL_MAX = (1 << CTRL_BITS) - 1;

  logic [C1_BITS-1:0]   c1;
  logic [C2_BITS-1:0]   fine;
  logic [CTRL_BITS-1:0] ctrl [N_HDC2];
  assign c1   = code_i[C1_BITS+C2_BITS-1:C2_BITS];
  assign fine = code_i[C2_BITS-1:0];

  always_comb begin
    int base, rem, v;
    base = int'(fine) / N_HDC2;
    rem  = int'(fine) % N_HDC2;
    for (int j = 0; j < N_HDC2; j++) begin
      v = base + ((j < rem) ? 1 : 0);
      if (v > CTRL_MAX) v = CTRL_MAX;
      ctrl[j] = CTRL_BITS'(v);
    end
  end

  logic nand_o, s1_o, fb;
  logic [N_HDC2:0] node;

  // NAND of the ring with the reset input.
  always begin
    nand_o <= #(T_NAND_NS) ~(rst_n & fb);
    @(rst_n or fb);
  end

  // 1st tuning stage: c1 coarse elements, half their cell delay per edge.
  always begin
    s1_o <= #(real'(c1) * RES1_NS / 2.0) nand_o;
    @(nand_o);
  end

  assign node[0] = s1_o;
  for (genvar j = 0; j < N_HDC2; j++) begin : g_hdc2
    hdc_cell #(.CTRL_BITS(CTRL_BITS), .D0_NS(HDC_D0_NS), .RES_NS(HDC_RES_NS)) u_cell (
      .in_i   (node[j]),
      .ctrl_i (ctrl[j]),
      .out_o  (node[j+1])
    );
  end

  assign fb    = node[N_HDC2];
  assign clk_o = fb;

endmodule
