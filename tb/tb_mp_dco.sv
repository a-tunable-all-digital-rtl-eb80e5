// tb_mp_dco: checks the 8-phase oscillator model: period versus the three
// stage settings, T/8 spacing of the phases, and the restart after reset
// (PHASE0 rises one period after the release).
`timescale 1ns / 1fs
module tb_mp_dco;
  import clkgen_pkg::*;
  logic               rst_n;
  dco_code_t          code;
  logic [N_ON1-1:0]   on1;
  logic [N_ON2-1:0]   on2;
  logic [N_ON3-1:0]   on3;
  logic [N_PHASES-1:0] ph;
  int checks = 0, failures = 0;

  // Control lines built here directly from the fields.
  always_comb begin
    on1 = '1; on1 = on1 << code.c1;
    on2 = '1; on2 = on2 << code.c2;
    on3 = '0;
    for (int j = 0; j < N_ON3; j++) on3[j] = (j < int'(code.c3));
  end

  mp_dco dut (.rst_n(rst_n), .on1_i(on1), .on2_i(on2), .on3_i(on3), .phase_o(ph));

  realtime rise[N_PHASES];
  realtime prev0, per0;
  for (genvar k = 0; k < N_PHASES; k++) begin : g_mon
    always @(posedge ph[k]) begin
      if (k == 0) begin per0 = $realtime - prev0; prev0 = $realtime; end
      rise[k] = $realtime;
    end
  end

  function automatic real expected(input int c1, input int c2, input int c3);
    return 60.0 + c1 * 30.27 + c2 * 1.0618 + c3 * 0.0086;
  endfunction

  task automatic near(input real got, input real exp, input string what);
    checks++;
    if (got < exp - 0.00001 || got > exp + 0.00001) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cs[4][3] = '{'{4, 17, 101}, '{0, 0, 0}, '{15, 31, 127}, '{7, 3, 64}};
    rst_n = 0; prev0 = 0; per0 = 0;
    code = '0;
    #100;
    checks++;
    if (ph !== '0) begin failures++; $display("FAIL phases not low in reset"); end
    foreach (cs[i]) begin
      realtime t_rel;
      real t;
      code.c1 = 4'(cs[i][0]); code.c2 = 5'(cs[i][1]); code.c3 = 7'(cs[i][2]);
      t = expected(cs[i][0], cs[i][1], cs[i][2]);
      #10;
      rst_n = 1; t_rel = $realtime;
      @(posedge ph[0]);
      near($realtime - t_rel, t, "first PHASE0 edge one period after release");
      repeat (3) @(posedge ph[0]);
      near(per0, t, "period");
      @(posedge ph[7]);
      #0.001;
      for (int k = 1; k < N_PHASES; k++)
        near(rise[k] - rise[0], k * t / 8.0, $sformatf("phase %0d offset", k));
      // falling edge of PHASE0 half a period after its rise
      @(posedge ph[0]);
      t_rel = $realtime;
      @(negedge ph[0]);
      near($realtime - t_rel, t / 2.0, "duty");
      rst_n = 0;
      #(t);
      checks++;
      if (ph !== '0) begin failures++; $display("FAIL phases not stopped"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
