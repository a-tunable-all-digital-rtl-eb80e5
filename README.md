# All-digital tunable clock generation for a body-area-network receiver

A wireless body-area-network sensor node spends most of its receive power in
the ADC. The ADC can run at the symbol rate if its sampling clock is steered
in two ways:
- **phase**: pick the best sampling instant out of eight per symbol;
- **frequency**: cancel the sampling-clock offset by a few hundred ppm.

This repository holds SystemVerilog for a clock subsystem that provides such
a clock with standard cells only. There is no PLL charge pump, no analog loop
filter and no crystal. It has three parts:

1. **PFTCG**, the phase-frequency tunable clock generator. A digital loop
   locks an 8-phase ring DCO to a 5 MHz reference. A glitch-free multiplexer
   then picks one of the 8 phases as the sampling clock. After lock, the
   frequency can be nudged in steps of about 8.6 ps of period.
2. **PVT tolerance clock generator**, which makes that 5 MHz reference on chip.
   - It measures how fast the chip is at the present process, voltage and
     temperature by racing two kinds of delay line.
   - It turns that measurement into a ring-oscillator length using three
     coefficients stored at test time.
   - It divides the ring output by 8.
3. **HDC DCO**, a low-power 5 MHz oscillator built from hysteresis delay
   cells. It is a stand-alone block beside the other two, with its own ports.

`wban_clkgen_top` wires parts 2 and 1 in series and places part 3 beside
them.

```
           retrack, coef a/b/c, d                    p_sel, tune_valid/tune_code
                    |                                          |
 rst_n -> [ PVT detector -> encoder -> mapper -> ring /8 ] --ref_clk--> [ PFTCG ] --> out_clk, phase[7:0], lock
                                                                        (PFD, controller, DCO encoder,
                                                                         8-phase DCO, glitch-free mux)
 hdc_rst_n, hdc_code -> [ HDC DCO ] --> hdc_clk
```

## What is synthesizable and what is a model

The oscillators and delay lines are timing circuits. Their behaviour is their
delay, so they are written as **behavioural models** with `#` delays in real
nanoseconds:
- `mp_dco`, the 8-phase PFTCG DCO;
- `osc_ring`, the PVT clock ring;
- `pvt_detector`, the delay-line pairs;
- `hdc_cell` and `hdc_dco`.

These models are not synthesizable. They compile with lint tools, but their
delays disappear in synthesis. Everything else is ordinary synthesizable RTL:
- `pfd`, the phase detector;
- `pftcg_ctrl`, the controller;
- `dco_encoder`;
- `gfcmux`, the glitch-free multiplexer;
- `pvt_encoder`;
- `mapper`;
- `osc_encoder`;
- `clk_div8`.

To build silicon, replace each model with cells of the same ports: delay
cells, multiplexers and varactors.

Delay values in the models come from the specification of the original
90 nm design where it gives them. The rest are chosen so that the nominal
operating point lands where it should. These models hold one set of cell
delays per instance, so a different PVT corner means different parameter
values.

## PFTCG

### DCO control word and DCO

The 16-bit `DCO_CODE` is `{c1[3:0], c2[4:0], c3[6:0]}`. It controls three
tuning stages in series.

| stage | bits | step | range | built as |
|---|---|---|---|---|
| 1 | 4 | 30.27 ns | 16 paths | cascaded 2:1 muxes, thermometer `ON1[i] = (i >= c1)` |
| 2 | 5 | 1.0618 ns | 32 paths | same structure, `ON2[i] = (i >= c2)` |
| 3 | 7 | 8.6 ps | 127 varactors | `ON3[j] = (j < c3)` |

Each finer stage covers more than one step of the coarser stage:
- stage 2 spans 32 x 1.06 ns, more than 30.27 ns;
- stage 3 spans 1.09 ns, more than 1.06 ns.

Because of this, the word is monotonic in delay when read as a plain binary
number, and the controller can search it as one number.

`mp_dco` models the ring:
- The period is `T = 60 ns + c1*30.27 + c2*1.0618 + c3*0.0086 ns`.
- The 60 ns fixed loop delay is an assumption. It puts 200 ns (5 MHz) near
  `c1 = 4`.
- The eight phases are spaced exactly T/8 apart.
- Holding `rst_n` low (RESET or CLEAR_DCO) stops the ring with all phases low.
- On release, PHASE0 rises one full period later. The loop therefore restarts
  aligned with the reference edge that released it.

### Phase detector (`pfd`)

The detector answers one question per compare: did PHASE0 or REF_CLK rise
first after the clear?
- UP means the feedback led, so the oscillator is too fast.
- DOWN means the reference led.
- Edges at exactly the same instant set neither flag (the dead zone).
- The flags stay set until the next clear.

The specified circuit is the usual three-state detector, whose two flip-flops
reset each other through an AND gate. It is replaced here by "edge seen"
flip-flops that are held until clear. For the first edge pair after a clear,
which is all the loop uses, both circuits give the same answer. The
loop-free form also cannot start up stuck with both bits set. Start-up
requirement: `clear_i` must rise once after power-up.

### Search, averaging and lock (`pftcg_ctrl`)

The controller runs on REF_CLK and updates the word once every four
reference cycles:
- **Cycle 0**: the new word is applied, and CLEAR_DCO and CLEAR_PFD are high.
- **Cycle 1**: both are released. The ring restarts on this edge.
- **Cycle 2**: the PFD compares the next reference edge with PHASE0, which
  arrives one DCO period after the restart.
- **Cycle 3**: a spare cycle. The flags are sampled at its end.

Search rule:
- The search starts at mid-range, with a step of a quarter of the range.
- UP raises the word (more delay) and DOWN lowers it.
- The step halves whenever the direction reverses, and also when neither
  flag is set.
- Once the step reaches 1, eight more updates are averaged. Their mean
  becomes the locked word and LOCK rises.

The specification bounds tracking at 128 reference cycles. The testbenches
check that bound, and the full loop locks in about 120 cycles, averaging
included. `pftcg` has a simulation-only parameter, `DCO_SCALE`. It multiplies
every oscillator delay so that the model can stand for a fast or slow corner.
`tb_pftcg_corners` locks copies at scales 0.75, 1.0 and 1.3. All three lock
within two finest steps of 200 ns, in 121 to 129 reference cycles.

After LOCK the ring is never cleared again. Each `tune_valid` pulse adds the
signed 8-bit `tune_code` to the word, with saturation. One LSB is 8.6 ps of
period, about 43 ppm at 5 MHz. The 127-step third stage spans about
±1090 ppm. The receiver's target is ±150 ppm.

The assertions in `pftcg_ctrl` check three rules:
- LOCK never falls while reset is high;
- the step is always a power of two;
- no clear is issued after lock.

### Glitch-free phase selection (`gfcmux`)

Each of the eight phases has a select flip-flop, clocked on that phase's own
falling edge. Its D input is "this phase is selected, and no other select
flip-flop is set". The output is the OR of `q[k] & phase[k]`.

When `p_sel` changes:
1. The old select drops after the old clock's falling edge, so its last high
   pulse is never cut.
2. Only then can the new select rise, on the new clock's falling edge.

The output stays low between the two, and it never carries a pulse shorter
than half a period. `active` brings out the select flip-flops.

## PVT tolerance clock generator

### Detector (`pvt_detector`, `pvt_encoder`)

Cell delays drift with process, voltage and temperature, but different cell
types drift differently. The ratio R of a buffer delay to a NAND delay
therefore marks the PVT condition.

When `enable_i` rises, the step runs down 84 pairs of delay lines:
- the reference line of every pair is 82 NAND cells;
- the variable line of pair i is 292+i buffers.

A `pfd` per pair tells which line finished first. Pair i reports "variable
line first" exactly when `R < 82/(292+i)`. The 84 answers form a thermometer
code over 83 intervals of R, from about 0.219 to 0.281. `pvt_encoder` counts
the set flags; the count is the interval index.

`done_o` rises when every line has delivered its edge, well within 100 ns.
The detection runs once after reset and again on each `retrack`.

The model has two delay parameters: a buffer delay of 0.09 ns and a NAND
delay of 0.36 ns (assumed). They give R = 0.25 and index 36.

### Mapper (`mapper`)

For a fixed process corner, the codeword that gives 5 MHz is close to a
quadratic in R:

    codeword = a*R^2 + b*R + c + d

- `a`, `b` and `c` are per-chip process coefficients. They would come from
  one-time-programmable storage written at test; here they are inputs.
- `d` is a tuning offset from the system's frequency recovery loop.

The mapper evaluates the quadratic at both ends of the detected interval and
uses the mean. It adds `d`, rounds and saturates to 11 bits.

The interval ends `82/(292+i)` form a table of constants with 16 fraction
bits, computed at elaboration. All arithmetic is exact integer arithmetic.
`a` and `b` are integers in codeword units per unit R^2 and per unit R.

### Ring and divider (`osc_encoder`, `osc_ring`, `clk_div8`)

- `osc_encoder` makes a one-hot tap enable out of the codeword.
- `osc_ring` is a ring of a NAND and a delay line with a tri-state tap after
  every cell. With tap k enabled, the half period is
  `0.2 ns + (k+1) x 0.02 ns`. Both delays are assumptions.
- `clk_div8` divides the ring output by 8.

Codeword 614 gives a 25 ns ring period and a 200 ns output. That is what
coefficients `a = 4000, b = -1000, c = 614` produce at R = 0.25. One step of
`d` moves the output period by 0.32 ns.

The ring runs only while the detector is done, so during `retrack` the
reference stops. The PFTCG keeps its lock through such a pause.

## HDC DCO (`hdc_cell`, `hdc_dco`)

Long buffer chains are what make a 5 MHz standard-cell DCO power hungry. A
hysteresis delay cell gives about 1.6 ns from one small cell.

`hdc_cell` models the delay-tunable cell:
- it inverts;
- each edge is delayed by half of `1.643 ns + code x 0.78 ps`;
- the code is 7 bits.

`hdc_dco` is a ring of:
- a NAND with the enable;
- `c1` coarse cells of 3.246 ns each (7 bits);
- 64 tunable cells that share a 13-bit fine word. Each cell gets fine/64, and
  the first fine%64 cells get one more.

The period runs from 106.8 ns (9.4 MHz) at code 0 to about 525 ns (1.9 MHz),
with a step of 0.78 ps.

The block is not connected to the PFTCG. Using it as the PFTCG's DCO is a
later step of the design, and its interface is not worked out.

## Departures and choices

Where the specification is silent or only gives the function, these choices
were made:
- **PFD:** loop-free first-edge detector instead of the three-state circuit
  with its pulse amplifier (see above).
- **DCO:**
  - fixed loop delay of 60 ns;
  - phases exactly equidistant (the measured chip shows some spread);
  - multiplexer polarity and thermometer direction of the stage controls
    chosen by this design.
- **Controller:**
  - the four-cycle split of an update;
  - 8 averaged updates;
  - the rule for a compare with no flag;
  - 8-bit signed TUNE_CODE.
- **PVT detector:**
  - NAND delay of 0.36 ns;
  - `done_o` as the end-of-detection signal.
- **Mapper:**
  - fixed-point formats;
  - rounding;
  - clamping of indices 0 and 84 to the first and last interval.
- **Clock oscillator:**
  - 20 ps cells;
  - 0.2 ns fixed loop delay;
  - 11-bit codeword.
- **HDC DCO:**
  - NAND delay (fitted to the 106.8 ns minimum);
  - spreading of the fine word over the 64 cells.

Not built:
- the receiver's timing and frequency error detectors and the ADC, which
  drive `p_sel` and `tune_code`;
- the coefficient storage;
- the 200 MHz variant of the HDC DCO (the length of its second stage is not
  known).

## Simulation

Every file is `timescale 1ns / 1fs`. The behavioural models need
`--timing`. Each block has a self-checking testbench `tb/tb_<block>.sv` that
prints one line `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/clkgen_pkg.sv tb/tb_wban_clkgen_top.sv --top-module tb_wban_clkgen_top
./obj_dir/Vtb_wban_clkgen_top +verilator+rand+reset+2
```

`tb_wban_clkgen_top` runs the whole subsystem at its default size, in about
36 µs of simulated time. It runs these steps in order:
1. reset;
2. PVT detection (under 100 ns, interval 36, codeword 614, 200 ns reference);
3. PFTCG search and lock;
4. eight phase switches with runt checks;
5. DCO tuning;
6. PVT tuning through `d`;
7. a re-track with LOCK held;
8. the HDC DCO at two codes.

It counts each of these mechanisms and fails if any count is zero.

All simulation is two-state, so every reset must produce a real edge. The
testbenches drive `rst_n` high for an instant before pulling it low. This
gives the detectors' clear inputs a rising edge.
