// clkgen_pkg: constants and types shared by the phase-frequency tunable
// clock generator (PFTCG).
//
// The 16-bit DCO control word is split into three tuning-stage fields: a
// 4-bit coarse path select (about 30.27 ns per step), a 5-bit middle path
// select (about 1.06 ns per step) and a 7-bit count of switched-in varactors
// (about 8.6 ps per step). The field widths and step sizes are the ones the
// design is specified with; placing the coarse field in the MSBs is this
// design's choice and makes the whole word monotonic in delay, because each
// finer stage covers one step of the coarser one.
//
// Lint note: a module that imports only some of these constants makes lint
// list the others as unused.
`timescale 1ns / 1fs
package clkgen_pkg;

  localparam int unsigned C1_BITS   = 4;   // 1st tuning stage (16-to-1 path selector)
  localparam int unsigned C2_BITS   = 5;   // 2nd tuning stage (32-to-1 path selector)
  localparam int unsigned C3_BITS   = 7;   // 3rd tuning stage (varactor count)
  localparam int unsigned CODE_BITS = C1_BITS + C2_BITS + C3_BITS;  // 16
  localparam int unsigned N_PHASES  = 8;

  localparam int unsigned N_ON1 = 1 << C1_BITS;        // 16 mux selects
  localparam int unsigned N_ON2 = 1 << C2_BITS;        // 32 mux selects
  localparam int unsigned N_ON3 = (1 << C3_BITS) - 1;  // 127 varactors

  typedef struct packed {
    logic [C1_BITS-1:0] c1;
    logic [C2_BITS-1:0] c2;
    logic [C3_BITS-1:0] c3;
  } dco_code_t;

  typedef enum logic [1:0] {
    ST_TRACK  = 2'd0,   // adaptive-step frequency/phase search
    ST_AVG    = 2'd1,   // step reached one: averaging the code
    ST_LOCKED = 2'd2    // LOCK high, fine tuning accepted
  } ctrl_state_e;

endpackage
