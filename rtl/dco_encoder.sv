// dco_encoder: DCO control word to the tuning-stage control lines.
//
// The 16-bit DCO_CODE holds three fields (see clkgen_pkg). The two path
// selectors are chains of 2-to-1 multiplexers, one per tap of a buffer delay
// line, the last one fed with a constant zero. A multiplexer with its select
// high takes its own tap; with it low it passes the longer path coming from
// the next multiplexer. Selecting a path of c extra delay cells therefore
// needs the thermometer code ON[i] = (i >= c). The 3rd stage is a row of 127
// digitally controlled varactors (a NAND3 gate load switched by ON3), and its
// 7-bit field is the number of varactors switched in: ON3[j] = (j < c3).
//
// The stage widths and the varactor-count reading (127 x 8.6 ps = 1.0922 ns,
// the stage range) follow the specification; the select polarity is this
// design's choice.
//
// Purely combinational.
`timescale 1ns / 1fs
module dco_encoder
  import clkgen_pkg::*;
(
  input  dco_code_t        dco_code_i,
  output logic [N_ON1-1:0] on1_o,
  output logic [N_ON2-1:0] on2_o,
  output logic [N_ON3-1:0] on3_o
);

  always_comb begin
    for (int i = 0; i < N_ON1; i++) on1_o[i] = (i >= int'(dco_code_i.c1));
    for (int i = 0; i < N_ON2; i++) on2_o[i] = (i >= int'(dco_code_i.c2));
    for (int j = 0; j < N_ON3; j++) on3_o[j] = (j <  int'(dco_code_i.c3));
  end

endmodule
