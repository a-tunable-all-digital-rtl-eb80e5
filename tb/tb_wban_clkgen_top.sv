// tb_wban_clkgen_top: end-to-end test of the whole clock generation
// subsystem at its full, default size (no parameter overrides).
//
// Sequence: reset; the PVT detector finishes and the ring oscillator starts
// (reference near 200 ns); the PFTCG searches and locks its DCO to that
// reference; the output is switched between phases; the DCO is fine-tuned
// with TUNE_CODE; the PVT clock is tuned with d; a PVT re-track stops and
// restarts the reference without losing LOCK; the HDC DCO is started and
// its period checked against its delay budget.
//
// Each mechanism is counted while it happens and the counts are printed at
// the end; every count must be non-zero. Counted: PVT detections done,
// reference edges, CLEAR_DCO pulses, search step halvings, LOCK rises,
// selected-phase changes, DCO code changes by tuning, PVT codeword changes,
// re-tracks and HDC DCO edges.
`timescale 1ns / 1fs
module tb_wban_clkgen_top;
  logic rst_n, retrack;
  logic signed [31:0] a, b, c;
  logic signed [11:0] d;
  logic [2:0] p_sel;
  logic tv;
  logic signed [7:0] tc;
  logic out_clk, lock, clear_dco, up, down, ref_clk, pvt_done;
  logic [7:0] phase, active;
  logic [15:0] code, step;
  logic [1:0] state;
  logic [10:0] pvt_cw;
  logic [6:0] pvt_idx;
  logic hdc_rst_n, hdc_clk;
  logic [19:0] hdc_code;
  int checks = 0, failures = 0;

  wban_clkgen_top dut (
    .rst_n(rst_n), .retrack(retrack), .coef_a(a), .coef_b(b), .coef_c(c), .tune_d(d),
    .p_sel(p_sel), .tune_valid(tv), .tune_code(tc),
    .out_clk(out_clk), .phase(phase), .lock(lock), .dco_code(code), .clear_dco(clear_dco),
    .up(up), .down(down), .step(step), .state(state), .active(active),
    .ref_clk(ref_clk), .pvt_codeword(pvt_cw), .pvt_idx(pvt_idx), .pvt_done(pvt_done),
    .hdc_rst_n(hdc_rst_n), .hdc_code(hdc_code), .hdc_clk(hdc_clk));

  function automatic real t_of(input logic [15:0] w);
    return 60.0 + real'(w[15:12]) * 30.27 + real'(w[11:7]) * 1.0618 + real'(w[6:0]) * 0.0086;
  endfunction

  function automatic real t_ref(input logic [10:0] k);
    return 16.0 * (0.2 + real'(int'(k) + 1) * 0.02);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  // ---- mechanism counters ----
  int n_done = 0, n_ref = 0, n_clear = 0, n_halve = 0, n_lock = 0, n_psw = 0;
  int n_dtune = 0, n_ptune = 0, n_retrack = 0, n_hdc = 0;
  logic [15:0] step_q;
  logic [7:0]  active_q;
  logic [15:0] code_q;
  logic [10:0] cw_q;
  initial begin step_q = '0; active_q = '0; code_q = '0; cw_q = '0; end

  always @(posedge pvt_done) n_done++;
  always @(posedge clear_dco) n_clear++;
  always @(posedge lock) n_lock++;
  always @(posedge retrack) n_retrack++;
  always @(posedge hdc_clk) n_hdc++;
  always @(posedge ref_clk) begin
    n_ref++;
    #1;
    if (rst_n && step != step_q && step < step_q) n_halve++;
    step_q = step;
    if (lock && code != code_q) n_dtune++;
    code_q = code;
  end
  // the multiplexer breaks before it makes: compare one-hot states only
  always @(active) begin
    if ($onehot(active)) begin
      if (rst_n && lock && $onehot(active_q) && active != active_q) n_psw++;
      active_q = active;
    end
  end
  always @(pvt_cw) begin
    if (pvt_done && pvt_cw != cw_q) n_ptune++;
    cw_q = pvt_cw;
  end

  // ---- period monitors ----
  realtime rr0, rper, pr0, pper, hr0, hper;
  initial begin rr0 = 0; rper = 0; pr0 = 0; pper = 0; hr0 = 0; hper = 0; end
  always @(posedge ref_clk) begin rper = $realtime - rr0; rr0 = $realtime; end
  always @(posedge phase[0]) begin pper = $realtime - pr0; pr0 = $realtime; end
  always @(posedge hdc_clk) begin hper = $realtime - hr0; hr0 = $realtime; end

  // no runt pulses on the selected output once locked
  realtime orise, ofall;
  initial begin orise = 0; ofall = 0; end
  always @(posedge out_clk) begin
    if (lock && ofall > 0) chk($realtime - ofall > 99.0, "no short low on OUT");
    orise = $realtime;
  end
  always @(negedge out_clk) begin
    if (lock && orise > 0) chk($realtime - orise > 99.0, "no short high on OUT");
    ofall = $realtime;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, tlock;
    int cyc, nr;
    a = 32'sd4000; b = -32'sd1000; c = 32'sd614; d = '0;
    retrack = 0; p_sel = 3'd0; tv = 0; tc = '0;
    hdc_code = {7'd20, 13'd1000};
    // real falling edges on both resets
    rst_n = 1; hdc_rst_n = 1;
    #0.1 rst_n = 0; hdc_rst_n = 0;
    #50;
    chk(!pvt_done && !lock, "idle in reset");

    // 1. PVT detection and reference clock
    rst_n = 1; t0 = $realtime;
    wait (pvt_done);
    chk($realtime - t0 < 100.0, "PVT detection within 100 ns");
    chk(pvt_idx == 7'd36, $sformatf("PVT interval %0d, expected 36", pvt_idx));
    chk(pvt_cw == 11'd614, $sformatf("PVT codeword %0d, expected 614", pvt_cw));
    repeat (3) @(posedge ref_clk);
    #1;
    chk(rper > 200.0 - 0.001 && rper < 200.0 + 0.001, $sformatf("reference period %f", rper));

    // 2. PFTCG search and lock
    cyc = 0;
    while (!lock && cyc < 400) begin @(posedge ref_clk); cyc++; end
    #1;
    chk(lock, "LOCK");
    chk(cyc <= 128 + 32 + 8, $sformatf("lock took %0d reference cycles", cyc));
    tlock = t_of(code);
    $display("locked after %0d reference cycles: word %04h, T=%f ns", cyc, code, tlock);
    chk(tlock > rper - 0.0172 && tlock < rper + 0.0172, "locked DCO period within 2 LSB of reference");
    repeat (3) @(posedge phase[0]);
    #0.001;
    chk(pper > tlock - 0.001 && pper < tlock + 0.001, "PHASE0 period");

    // 3. phase selection
    foreach (phase[k]) begin
      p_sel = 3'((k * 5 + 3) % 8);
      repeat (3) @(posedge out_clk);
      for (int j = 0; j < 8; j++) begin
        #(tlock / 8.0 - 0.3);
        chk(out_clk === phase[p_sel], $sformatf("OUT follows PHASE%0d", p_sel));
        #0.3;
      end
    end

    // 4. DCO fine tuning through TUNE_CODE
    @(negedge ref_clk); tv = 1; tc = 8'sd4;
    @(negedge ref_clk); tv = 0;
    repeat (3) @(posedge phase[0]);
    #0.001;
    chk(pper > tlock + 4 * 0.0086 - 0.001 && pper < tlock + 4 * 0.0086 + 0.001, "tuned DCO period +4 LSB");
    chk(lock, "LOCK kept after tuning");

    // 5. PVT clock tuning through d
    d = 12'sd2;
    #1;
    chk(pvt_cw == 11'd616, "PVT codeword follows d");
    repeat (3) @(posedge ref_clk);
    #1;
    chk(rper > t_ref(11'd616) - 0.001 && rper < t_ref(11'd616) + 0.001, "tuned reference period");
    d = '0;
    repeat (3) @(posedge ref_clk);

    // 6. PVT re-track: reference stops, comes back, LOCK stays
    retrack = 1;
    #10;
    chk(!pvt_done, "detector re-armed");
    nr = n_ref;
    #2000;
    chk(n_ref == nr, "reference stopped during re-track");
    retrack = 0; t0 = $realtime;
    wait (pvt_done);
    chk($realtime - t0 < 100.0, "re-detection within 100 ns");
    repeat (3) @(posedge ref_clk);
    #1;
    chk(rper > 200.0 - 0.001 && rper < 200.0 + 0.001, "reference period after re-track");
    chk(lock, "LOCK kept through re-track");

    // 7. HDC DCO
    hdc_rst_n = 1;
    repeat (4) @(posedge hdc_clk);
    #0.001;
    begin
      real te;
      te = 2 * 0.824 + 20.0 * 3.246 + 64 * 1.643 + 1000.0 * 0.00078;
      chk(hper > te - 0.00001 && hper < te + 0.00001, $sformatf("HDC period %f expected %f", hper, te));
    end
    hdc_code = {7'd0, 13'd0};
    repeat (4) @(posedge hdc_clk);
    #0.001;
    chk(hper > 106.8 - 0.001 && hper < 106.8 + 0.001, "HDC fastest setting 106.8 ns");

    // mechanism counts
    $display("counts: detections=%0d ref_edges=%0d clears=%0d halvings=%0d locks=%0d",
             n_done, n_ref, n_clear, n_halve, n_lock);
    $display("counts: phase_switches=%0d dco_tunes=%0d pvt_tunes=%0d retracks=%0d hdc_edges=%0d",
             n_psw, n_dtune, n_ptune, n_retrack, n_hdc);
    chk(n_done == 2, "two PVT detections");
    chk(n_ref > 160, "reference edges");
    chk(n_clear >= 16, "CLEAR_DCO pulses");
    chk(n_halve >= 2, "step halvings");
    chk(n_lock == 1, "one LOCK rise");
    chk(n_psw >= 7, "phase switches");
    chk(n_dtune >= 1, "DCO tuning steps");
    chk(n_ptune >= 2, "PVT tuning steps");
    chk(n_retrack == 1, "re-tracks");
    chk(n_hdc > 8, "HDC DCO edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
