// pfd: phase frequency detector with sticky lead/lag flags.
//
// Decides which of two clocks, the reference ref_i or the feedback fb_i,
// shows the first rising edge after clear_i is released, and holds that
// answer until the next clear. Two "seen" flip-flops, one per input, are set
// by the first rising edge of their clock. Two flag flip-flops record the
// order: UP is set by a feedback edge that arrives while no reference edge
// has been seen, DOWN by a reference edge that arrives while no feedback edge
// has been seen. Edges at exactly the same instant set both raw flags; the
// outputs then show neither (the dead zone).
//
// UP means "feedback leads, slow the oscillator down", as in the circuit
// description of the detector. Own choice: the specified detector is the
// classic three-state circuit whose two flip-flops reset each other through
// an AND gate. That loop is replaced here by flip-flops that stay set until
// clear_i. Both give the same flags for the first edge pair after a clear,
// which is all the controller and the PVT detector look at, and the loop-free
// form cannot get stuck with both bits set in a two-state simulation. The
// gate-level pulse amplifier against the dead zone is not modelled.
//
// Interface: ref_i, fb_i clocks; clear_i asynchronous, active high.
// Timing: flags change on the rising edges of ref_i / fb_i. A rising edge of
// clear_i is needed once after power-up to empty all four flip-flops.
`timescale 1ns / 1fs
module pfd (
  input  logic ref_i,
  input  logic fb_i,
  input  logic clear_i,
  output logic up_o,
  output logic down_o
);

  logic seen_r, seen_f;   // a reference / feedback edge has been seen
  logic up_q, down_q;     // raw flags

  always_ff @(posedge ref_i or posedge clear_i) begin
    if (clear_i) begin
      seen_r <= 1'b0;
      down_q <= 1'b0;
    end else begin
      seen_r <= 1'b1;
      if (!seen_f) down_q <= 1'b1;
    end
  end

  always_ff @(posedge fb_i or posedge clear_i) begin
    if (clear_i) begin
      seen_f <= 1'b0;
      up_q   <= 1'b0;
    end else begin
      seen_f <= 1'b1;
      if (!seen_r) up_q <= 1'b1;
    end
  end

  // both raw flags set only for coincident first edges
  assign up_o   = up_q & ~down_q;
  assign down_o = down_q & ~up_q;

endmodule
