// pftcg_ctrl: controller of the phase-frequency tunable clock generator.
//
// Runs on the reference clock. After reset it searches the DCO control word
// with an adaptive step: the word starts in the middle of its range and the
// step at a quarter of the range (n/4 for n codes). Every update takes
// UPD_CYCLES reference cycles:
//   cycle 0  new word applied, CLEAR_DCO and CLEAR_PFD high (ring stopped,
//            detector flags cleared)
//   cycle 1  both released on this edge: the ring restarts aligned with the
//            reference edge
//   cycle 2  the detector compares the next reference edge with PHASE0
//   last     spare cycle; at its end the UP/DOWN flags are sampled and the
//            next word is computed
// UP (DCO edge first, oscillator too fast) raises the word, which lengthens
// the ring; DOWN lowers it. The step stays the same while the direction
// holds and halves on every lead/lag reversal. With no flag (edges inside the
// detector's dead zone) the word is kept and the step halves. When the step
// reaches one the frequency is acquired; 2**AVG_LOG2 further one-step
// updates are averaged, that mean becomes the word and LOCK rises. The
// worst-case search takes about 4 x 2 x 16 = 128 reference cycles.
//
// Once locked the ring is never cleared again. Each TUNE_VALID adds the
// signed TUNE_CODE (in units of the finest DCO step, about 8.6 ps) to the
// word, saturating, for fine frequency tuning from the receiver's frequency
// error detector.
//
// The search rule, start point, first step, clear sequence and averaging
// follow the described control mechanism; the four-cycle update split,
// the averaging length, the dead-zone rule and the tuning word format are
// this design's choices.
//
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only the disable condition of the
// assertions below.
`timescale 1ns / 1fs
module pftcg_ctrl
  import clkgen_pkg::ctrl_state_e, clkgen_pkg::ST_TRACK, clkgen_pkg::ST_AVG, clkgen_pkg::ST_LOCKED;
#(
  parameter int unsigned CODE_BITS  = clkgen_pkg::CODE_BITS,
  parameter int unsigned UPD_CYCLES = 4,
  parameter int unsigned AVG_LOG2   = 3,
  parameter int unsigned TUNE_BITS  = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        up_i,
  input  logic                        down_i,
  input  logic                        tune_valid_i,
  input  logic signed [TUNE_BITS-1:0] tune_code_i,
  output logic [CODE_BITS-1:0]        dco_code_o,
  output logic                        clear_dco_o,
  output logic                        clear_pfd_o,
  output logic                        lock_o,
  output logic [CODE_BITS-1:0]        step_o,
  output ctrl_state_e                 state_o
);

  localparam int unsigned CW = $clog2(UPD_CYCLES);
  localparam logic [CODE_BITS-1:0] MID_CODE   = CODE_BITS'(1) << (CODE_BITS - 1);
  localparam logic [CODE_BITS-1:0] FIRST_STEP = CODE_BITS'(1) << (CODE_BITS - 2);
  localparam logic signed [CODE_BITS+1:0] CODE_MAX = (CODE_BITS+2)'((1 << CODE_BITS) - 1);
  localparam logic signed [CODE_BITS+1:0] ZERO = '0;

  ctrl_state_e                 state;
  logic [CODE_BITS-1:0]        code, step;
  logic                        dir_up, have_dir;
  logic [CW-1:0]               cnt;
  logic                        clear_r;
  logic [AVG_LOG2:0]           avg_cnt;
  logic [CODE_BITS+AVG_LOG2-1:0] acc;

  // Word moved by a step in a direction, saturating at both ends.
  function automatic logic [CODE_BITS-1:0] move(input logic [CODE_BITS-1:0] c,
                                                input logic [CODE_BITS-1:0] s,
                                                input logic go_up);
    logic signed [CODE_BITS+1:0] v;
    v = go_up ? $signed({2'b00, c}) + $signed({2'b00, s})
           : $signed({2'b00, c}) - $signed({2'b00, s});
    if (v < ZERO)        return '0;
    if (v > CODE_MAX) return '1;
    return v[CODE_BITS-1:0];
  endfunction

  logic flag_up, flag_any;
  assign flag_any = up_i | down_i;
  assign flag_up  = up_i;          // UP wins if both were seen

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_TRACK;
      code     <= MID_CODE;
      step     <= FIRST_STEP;
      dir_up   <= 1'b0;
      have_dir <= 1'b0;
      cnt      <= '0;
      clear_r  <= 1'b1;
      avg_cnt  <= '0;
      acc      <= '0;
    end else begin
      unique case (state)
        ST_TRACK, ST_AVG: begin
          if (cnt == CW'(UPD_CYCLES - 1)) begin
            logic [CODE_BITS-1:0] nstep, ncode;
            cnt     <= '0;
            clear_r <= 1'b1;
            nstep = step;
            ncode = code;
            if (!flag_any) begin
              if (step > 1) nstep = step >> 1;
            end else begin
              if (have_dir && (flag_up != dir_up) && step > 1) nstep = step >> 1;
              ncode    = move(code, nstep, flag_up);
              dir_up   <= flag_up;
              have_dir <= 1'b1;
            end
            step <= nstep;
            if (state == ST_TRACK) begin
              code <= ncode;
              if (nstep == 1) begin
                state   <= ST_AVG;
                avg_cnt <= '0;
                acc     <= '0;
              end
            end else begin
              if (avg_cnt == (AVG_LOG2+1)'(1 << AVG_LOG2) - 1) begin
                code    <= CODE_BITS'((acc + (CODE_BITS+AVG_LOG2)'(ncode)) >> AVG_LOG2);
                state   <= ST_LOCKED;
                clear_r <= 1'b0;
              end else begin
                code    <= ncode;
                acc     <= acc + (CODE_BITS+AVG_LOG2)'(ncode);
                avg_cnt <= avg_cnt + 1'b1;
              end
            end
          end else begin
            cnt     <= cnt + 1'b1;
            clear_r <= 1'b0;
          end
        end
        ST_LOCKED: begin
          clear_r <= 1'b0;
          if (tune_valid_i) begin
            logic signed [CODE_BITS+1:0] v;
            v = $signed({2'b00, code}) + (CODE_BITS+2)'(tune_code_i);
            if (v < ZERO)             code <= '0;
            else if (v > CODE_MAX) code <= '1;
            else                   code <= v[CODE_BITS-1:0];
          end
        end
        default: state <= ST_TRACK;
      endcase
    end
  end

  assign dco_code_o  = code;
  assign clear_dco_o = clear_r;
  assign clear_pfd_o = clear_r;
  assign lock_o      = (state == ST_LOCKED);
  assign step_o      = step;
  assign state_o     = state;

  // LOCK, once reached, holds until reset; the search step is a power of two.
  a_lock_holds: assert property (@(posedge clk) disable iff (!rst_n) lock_o |=> lock_o);
  a_step_pow2:  assert property (@(posedge clk) disable iff (!rst_n) $onehot(step));
  a_no_clear_when_locked: assert property (@(posedge clk) disable iff (!rst_n)
                                           lock_o |-> !clear_dco_o);

endmodule
