// tb_pftcg: closed-loop test of the phase-frequency tunable clock generator
// with a 5 MHz reference. Checks: LOCK within the search bound (128 cycles
// of tracking plus 32 of averaging), the locked PHASE0 period within two
// finest DCO steps of 200 ns, eight phases 25 ns apart, glitch-free phase
// switching through the multiplexer (PHASE7 to PHASE2 and a random walk),
// and frequency fine tuning: TUNE_CODE = +3 lengthens the period by about
// 3 x 8.6 ps.
`timescale 1ns / 1fs
module tb_pftcg;
  logic ref_clk = 0, rst_n;
  logic [2:0] p_sel;
  logic tv;
  logic signed [7:0] tc;
  logic out_clk, lock, clear_dco, up, down;
  logic [7:0] phase, active;
  logic [15:0] code, step;
  logic [1:0] state;
  int checks = 0, failures = 0;

  always #100 ref_clk = ~ref_clk;

  pftcg dut (.ref_clk(ref_clk), .rst_n(rst_n), .p_sel(p_sel), .tune_valid(tv), .tune_code(tc),
             .out_clk(out_clk), .phase(phase), .lock(lock), .dco_code(code), .clear_dco(clear_dco),
             .up(up), .down(down), .step(step), .state(state), .active(active));

  function automatic real t_of(input logic [15:0] w);
    return 60.0 + real'(w[15:12]) * 30.27 + real'(w[11:7]) * 1.0618 + real'(w[6:0]) * 0.0086;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  realtime r0, per;
  initial r0 = 0;
  always @(posedge phase[0]) begin per = $realtime - r0; r0 = $realtime; end

  // output pulse widths once locked (no runts)
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
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int nclear;
    realtime tp[8];
    real tlock;
    rst_n = 0; p_sel = 3'd0; tv = 0; tc = 0;
    repeat (3) @(posedge ref_clk);
    #1 rst_n = 1;
    cyc = 0; nclear = 0;
    while (!lock && cyc < 300) begin
      @(posedge ref_clk); cyc++;
      #1 if (clear_dco) nclear++;
    end
    $display("locked after %0d reference cycles, %0d clears, word %04h, T=%f", cyc, nclear, code, t_of(code));
    chk(lock, "LOCK");
    chk(cyc <= 128 + 32 + 4, "lock time");
    chk(nclear >= 16, "CLEAR_DCO pulses during tracking");
    tlock = t_of(code);
    chk(tlock > 200.0 - 0.0172 && tlock < 200.0 + 0.0172, "locked word gives 200 ns within 2 LSB");
    repeat (3) @(posedge phase[0]);
    #0.001;
    chk(per > tlock - 0.001 && per < tlock + 0.001, "PHASE0 period");
    // phase spacing
    @(posedge phase[0]); tp[0] = $realtime;
    for (int k = 1; k < 8; k++) begin @(posedge phase[k]); tp[k] = $realtime; end
    for (int k = 1; k < 8; k++)
      chk((tp[k] - tp[0]) > k * 25.0 - 0.01 && (tp[k] - tp[0]) < k * 25.0 + 0.01, $sformatf("phase %0d spacing", k));
    // phase selection: PHASE7 then PHASE2, then a random walk
    begin
      logic [2:0] seq[$] = '{3'd7, 3'd2};
      repeat (10) seq.push_back(3'($urandom_range(0, 7)));
      foreach (seq[i]) begin
        #($urandom_range(10, 400));
        p_sel = seq[i];
        repeat (3) @(posedge out_clk);
        for (int k = 0; k < 8; k++) begin
          #(200.0 / 8.0 - 0.3);
          chk(out_clk === phase[p_sel], $sformatf("OUT follows PHASE%0d", p_sel));
          #0.3;
        end
      end
    end
    // frequency tuning
    @(negedge ref_clk); tv = 1; tc = 8'sd3;
    @(negedge ref_clk); tv = 0;
    repeat (3) @(posedge phase[0]);
    #0.001;
    chk(per > tlock + 3 * 0.0086 - 0.001 && per < tlock + 3 * 0.0086 + 0.001, "tuned period +3 LSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
