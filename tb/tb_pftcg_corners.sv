// tb_pftcg_corners: the PFTCG must lock to the 5 MHz reference whatever the
// speed of its cells. Three copies run from one 5 MHz reference with every
// oscillator delay scaled by 0.75 (fast corner), 1.0 and 1.3 (slow corner).
// For each copy it checks LOCK within the search bound plus averaging, the
// locked word's period within two finest steps of 200 ns, and the measured
// PHASE0 period against that word. The scale factors are chosen for the
// test; they keep 200 ns inside the oscillator's range at every corner.
`timescale 1ns / 1fs
module tb_pftcg_corners;
  localparam int NC = 3;
  localparam real SCALE [NC] = '{0.75, 1.0, 1.3};

  logic ref_clk = 0, rst_n;
  logic [NC-1:0] lock;
  logic [15:0]   code [NC];
  logic [7:0]    phase [NC];
  int checks = 0, failures = 0;

  always #100 ref_clk = ~ref_clk;

  for (genvar c = 0; c < NC; c++) begin : g_c
    logic out_clk, clear_dco, up, down;
    logic [7:0] active;
    logic [15:0] step;
    logic [1:0] state;
    pftcg #(.DCO_SCALE(SCALE[c])) dut (
      .ref_clk(ref_clk), .rst_n(rst_n), .p_sel(3'd0), .tune_valid(1'b0), .tune_code(8'sd0),
      .out_clk(out_clk), .phase(phase[c]), .lock(lock[c]), .dco_code(code[c]),
      .clear_dco(clear_dco), .up(up), .down(down), .step(step), .state(state), .active(active));
  end

  realtime r0 [NC];
  realtime per [NC];
  for (genvar c = 0; c < NC; c++) begin : g_mon
    initial begin r0[c] = 0; per[c] = 0; end
    always @(posedge phase[c][0]) begin per[c] = $realtime - r0[c]; r0[c] = $realtime; end
  end

  function automatic real t_of(input logic [15:0] w, input real k);
    return k * (60.0 + real'(w[15:12]) * 30.27 + real'(w[11:7]) * 1.0618 + real'(w[6:0]) * 0.0086);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int lock_cyc [NC];
    foreach (lock_cyc[c]) lock_cyc[c] = -1;
    // a real falling edge on reset clears the detectors
    rst_n = 1;
    #0.1 rst_n = 0;
    repeat (3) @(posedge ref_clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!(&lock) && cyc < 300) begin
      @(posedge ref_clk); cyc++;
      for (int c = 0; c < NC; c++) if (lock[c] && lock_cyc[c] < 0) lock_cyc[c] = cyc;
    end
    repeat (4) @(posedge ref_clk);
    #0.001;
    for (int c = 0; c < NC; c++) begin
      real t;
      t = t_of(code[c], SCALE[c]);
      $display("scale %0.2f: LOCK after %0d cycles, word %04h, T=%f ns, PHASE0 period %f ns",
               SCALE[c], lock_cyc[c], code[c], t, per[c]);
      chk(lock[c], $sformatf("scale %0.2f LOCK", SCALE[c]));
      chk(lock_cyc[c] > 0 && lock_cyc[c] <= 128 + 32 + 4, $sformatf("scale %0.2f lock time", SCALE[c]));
      chk(t > 200.0 - 2 * 0.0086 * SCALE[c] && t < 200.0 + 2 * 0.0086 * SCALE[c],
          $sformatf("scale %0.2f locked period", SCALE[c]));
      chk(per[c] > t - 0.001 && per[c] < t + 0.001, $sformatf("scale %0.2f PHASE0 period", SCALE[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
