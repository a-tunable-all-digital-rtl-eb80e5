// mp_dco: behavioural model of the 8-phase, cell-based digitally controlled
// oscillator. Not synthesizable: the delay line is analog timing and is
// modelled with delays.
//
// The real oscillator is a ring: a NAND gate (with RESET on its other input)
// drives a 1st tuning stage, a buffer chain tapped by a 16-to-1 multiplexer
// path selector; four multiplexer groups take outputs OUT0..OUT3 at equal
// spacing along the ring, each is trimmed by its own 2nd stage (32-to-1 path
// selector) and 3rd stage (127 switchable varactors), and buffers/inverters
// turn P0..P3 into PHASE0..PHASE7. PHASE0 closes the loop.
//
// The model reads the stage settings back from the control lines (number of
// zero selects in ON1 and ON2, number of enabled varactors in ON3) and sets
// the oscillation period to
//     T = T_BASE_NS + c1*RES1_NS + c2*RES2_NS + c3*RES3_NS.
// The three resolutions are the specified typical-corner values; T_BASE_NS,
// the loop delay at code zero, is this model's assumption. The eight phases
// are spaced exactly T/8 apart with 50 % duty (PHASE4..7 are the inverted
// PHASE0..3); the measured spacing of a real part is uneven.
//
// rst_n low stops the ring: all phases fall to zero at once and stay there. After rst_n rises the ring restarts with PHASE1 rising
// after T/8, PHASE2 after 2T/8, ..., and PHASE0 first rising one full period
// after the release, so a release aligned with a reference edge lets a phase
// detector compare the two periods. A change of the ON lines takes effect at
// the next eighth-period step.
//
// Lint note: the phase step is worked out at run time from the ON codes, so
// lint cannot prove it non-zero; it is at least T_BASE_NS / 8.
`timescale 1ns / 1fs
module mp_dco
  import clkgen_pkg::*;
#(
  parameter real T_BASE_NS = 60.0,
  parameter real RES1_NS   = 30.27,
  parameter real RES2_NS   = 1.0618,
  parameter real RES3_NS   = 0.0086
) (
  input  logic                rst_n,
  input  logic [N_ON1-1:0]    on1_i,
  input  logic [N_ON2-1:0]    on2_i,
  input  logic [N_ON3-1:0]    on3_i,
  output logic [N_PHASES-1:0] phase_o
);

  // element counts per stage; the period is worked out where it is used, so
  // that no real-valued signal exists
  int c1, c2, c3;
  always_comb begin
    c1 = 0; c2 = 0; c3 = 0;
    for (int i = 0; i < N_ON1; i++) c1 += int'(!on1_i[i]);
    for (int i = 0; i < N_ON2; i++) c2 += int'(!on2_i[i]);
    for (int i = 0; i < N_ON3; i++) c3 += int'(on3_i[i]);
  end

  logic [N_PHASES-1:0] ph;
  assign phase_o = ph;

  initial begin
    int s;
    ph = '0;
    forever begin
      wait (rst_n);
      s = 1;
      fork
        forever begin
          #((T_BASE_NS + real'(c1) * RES1_NS + real'(c2) * RES2_NS + real'(c3) * RES3_NS)
            / real'(N_PHASES));
          ph[s]                           = 1'b1;
          ph[(s + N_PHASES/2) % N_PHASES] = 1'b0;
          s = (s + 1) % N_PHASES;
        end
        @(negedge rst_n);
      join_any
      disable fork;
      ph = '0;
    end
  end

endmodule
