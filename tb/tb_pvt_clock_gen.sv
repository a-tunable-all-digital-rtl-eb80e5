// tb_pvt_clock_gen: self-checking test of the PVT tolerance clock generator.
// Two copies run side by side: one at the nominal corner and one with faster
// buffers (delay ratio 0.222). For each it checks that detection finishes
// within 100 ns of enable, the interval index, the codeword against a
// floating-point model of the partition rule, and the output period against
// 8 x 2 x (fixed + cells x cell delay). It then steps the tuning input d,
// checks codeword and period follow, and pulses retrack: the clock must
// stop while the detector is re-armed and come back with the same index.
`timescale 1ns / 1fs
module tb_pvt_clock_gen;
  logic rst_n, retrack;
  logic signed [31:0] a, b, c;
  logic signed [11:0] d;
  logic [1:0]  clk, done;
  logic [10:0] cw [2];
  logic [6:0]  idx [2];
  int checks = 0, failures = 0;

  // nominal corner and a fast-buffer corner
  pvt_clock_gen dut0 (.rst_n(rst_n), .retrack_i(retrack), .coef_a_i(a), .coef_b_i(b),
    .coef_c_i(c), .tune_d_i(d), .clk_o(clk[0]), .codeword_o(cw[0]), .idx_o(idx[0]),
    .det_done_o(done[0]));
  pvt_clock_gen #(.D_BUF_NS(0.08)) dut1 (.rst_n(rst_n), .retrack_i(retrack), .coef_a_i(a),
    .coef_b_i(b), .coef_c_i(c), .tune_d_i(d), .clk_o(clk[1]), .codeword_o(cw[1]),
    .idx_o(idx[1]), .det_done_o(done[1]));

  // rising-edge bookkeeping per copy
  realtime last_r [2];
  realtime per [2];
  int      n_r [2];
  for (genvar g = 0; g < 2; g++) begin : g_mon
    always @(posedge clk[g]) begin
      per[g]    = $realtime - last_r[g];
      last_r[g] = $realtime;
      n_r[g]++;
    end
  end

  function automatic real quad(input real r);
    return real'(a) * r * r + real'(b) * r + real'(c);
  endfunction

  function automatic int exp_cw(input int k, input int dd);
    int kk, v;
    real rl, rh;
    kk = (k < 1) ? 1 : ((k > 83) ? 83 : k);
    rl = 82.0 / real'(292 + kk);
    rh = 82.0 / real'(292 + kk - 1);
    v = int'($floor((quad(rl) + quad(rh)) / 2.0 + 0.5)) + dd;
    if (v < 0) v = 0;
    if (v > 2047) v = 2047;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_copy(input int g, input int e_idx);
    int ecw;
    real eper;
    ecw = exp_cw(e_idx, int'(d));
    check(idx[g] == 7'(e_idx), $sformatf("copy %0d idx %0d expected %0d", g, idx[g], e_idx));
    // the float reference may round the other way at a half
    check(int'(cw[g]) - ecw <= 1 && ecw - int'(cw[g]) <= 1,
          $sformatf("copy %0d codeword %0d expected %0d", g, cw[g], ecw));
    eper = 16.0 * (0.2 + real'(int'(cw[g]) + 1) * 0.02);
    check(per[g] > eper - 0.001 && per[g] < eper + 0.001,
          $sformatf("copy %0d period %f expected %f", g, per[g], eper));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    int n0;
    last_r[0] = 0.0; last_r[1] = 0.0; per[0] = 0.0; per[1] = 0.0; n_r[0] = 0; n_r[1] = 0;
    a = 32'sd4000; b = -32'sd1000; c = 32'sd614; d = '0; retrack = 0;
    // a real falling edge of rst_n clears the detector
    rst_n = 1;
    #0.1 rst_n = 0;
    #50;
    check(done == 2'b00, "done while in reset");
    rst_n = 1; t0 = $realtime;
    wait (&done);
    check($realtime - t0 < 100.0, $sformatf("detection took %f ns", $realtime - t0));
    #2000;
    check_copy(0, 36);
    check_copy(1, 77);
    check(per[0] > 198.0 && per[0] < 202.0, $sformatf("nominal period %f not near 200 ns", per[0]));

    // frequency tuning step
    d = 12'sd10;
    #1000;
    check_copy(0, 36);
    check_copy(1, 77);
    d = -12'sd20;
    #1000;
    check_copy(0, 36);
    d = '0;

    // retrack: detector re-armed, clock stops, then returns
    #500;
    retrack = 1;
    #10;
    check(done == 2'b00, "done still high during retrack");
    n0 = n_r[0];
    #1000;
    check(n_r[0] == n0, "clock kept running during retrack");
    retrack = 0; t0 = $realtime;
    wait (&done);
    check($realtime - t0 < 100.0, "re-detection too slow");
    #2000;
    check_copy(0, 36);
    check_copy(1, 77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
