// osc_ring: behavioural model of the clock-oscillator ring. Not
// synthesizable: a delay line modelled with delays.
//
// A NAND gate (rst_n on its second input) drives a line of oscillator cells;
// a tri-state buffer after each cell, enabled by on_i, returns one tap to the
// NAND. With tap k enabled the one-way loop delay is
//     T_FIXED_NS + (k + 1) * T_CELL_NS
// and ring_o toggles at that interval (period twice that). Each oscillator
// cell is taken as a pair of clock inverters so that every tap keeps the loop
// inverting; the cell and fixed delays (20 ps and 0.2 ns) are this model's
// assumptions, chosen so that a ring period of 25 ns (5 MHz after the
// divide-by-8) needs a codeword of about 614.
//
// rst_n low stops the ring at once with ring_o low; after
// rst_n rises ring_o first rises half a period later. If no tap is enabled
// the output holds its level. A new tap takes effect at the next half period.
//
// Lint note: the half period is worked out at run time from the tap, so
// lint cannot prove it non-zero; it is at least T_FIXED_NS + T_CELL_NS.
`timescale 1ns / 1fs
module osc_ring #(
  parameter int unsigned N_TAPS     = 2048,
  parameter real         T_CELL_NS  = 0.02,
  parameter real         T_FIXED_NS = 0.2
) (
  input  logic              rst_n,
  input  logic [N_TAPS-1:0] on_i,
  output logic              ring_o
);

  // number of cells in the loop; the half period is worked out where it is
  // used, so that no real-valued signal exists
  int   n_cells;
  logic tap_valid;
  always_comb begin
    int tap;
    tap = -1;
    for (int k = N_TAPS - 1; k >= 0; k--) if (on_i[k]) tap = k;
    tap_valid = (tap >= 0);
    n_cells   = tap_valid ? tap + 1 : 1;
  end

  initial begin
    ring_o = 1'b0;
    forever begin
      wait (rst_n);
      fork
        forever begin
          #(T_FIXED_NS + real'(n_cells) * T_CELL_NS);
          if (tap_valid) ring_o = ~ring_o;
        end
        @(negedge rst_n);
      join_any
      disable fork;
      ring_o = 1'b0;
    end
  end

endmodule
