// tb_mapper: compares the mapper with the same partition rule evaluated in
// floating point: thresholds R_i = 82/(292+i), interval k between R_k and
// R_(k-1), codeword = round(mean of a*R^2 + b*R + c at both ends) + d,
// saturated to 0..2047. Fixed-point rounding of R allows one LSB difference.
`timescale 1ns / 1fs
module tb_mapper;
  logic [6:0]         idx;
  logic signed [31:0] a, b, c;
  logic signed [11:0] d;
  logic [10:0]        cw;
  int checks = 0, failures = 0;
  int sat_lo = 0, sat_hi = 0;

  mapper dut (.idx_i(idx), .coef_a_i(a), .coef_b_i(b), .coef_c_i(c), .tune_d_i(d), .codeword_o(cw));

  function automatic int expected(input int k, input int ia, input int ib, input int ic, input int id);
    real rl, rh, q;
    int kk, v;
    kk = (k < 1) ? 1 : (k > 83) ? 83 : k;
    rl = 82.0 / real'(292 + kk);
    rh = 82.0 / real'(292 + kk - 1);
    q = (ia * (rl * rl + rh * rh) + ib * (rl + rh)) / 2.0 + ic;
    v = int'($floor(q + 0.5)) + id;
    if (v < 0) v = 0;
    if (v > 2047) v = 2047;
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int e;
      idx = 7'($urandom_range(0, 84));
      a = $signed($urandom_range(0, 40000)) - 20000;
      b = $signed($urandom_range(0, 40000)) - 20000;
      c = $signed($urandom_range(0, 8000)) - 3000;
      d = 12'($signed($urandom_range(0, 200)) - 100);
      if (n < 85) begin idx = 7'(n); a = 20000; b = 30000; c = -8000; d = 0; end
      #1;
      e = expected(int'(idx), int'(a), int'(b), int'(c), int'(d));
      if (e == 0) sat_lo++;
      if (e == 2047) sat_hi++;
      checks++;
      if (int'(cw) < e - 1 || int'(cw) > e + 1) begin
        failures++;
        $display("FAIL idx=%0d a=%0d b=%0d c=%0d d=%0d: %0d expected %0d", idx, a, b, c, d, cw, e);
      end
    end
    checks++;
    if (sat_lo == 0 || sat_hi == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
