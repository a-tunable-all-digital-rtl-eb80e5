// tb_pftcg_ctrl: the controller against an ideal detector. The test bench
// stands in for the oscillator with a hidden target word X: the DCO is too
// fast (UP) while the word is below X and too slow (DOWN) above it. For many
// targets, including both ends of the range, it checks that the search
// reaches step one within 128 reference cycles, that LOCK follows and the
// locked word is within one LSB of X, that CLEAR_DCO is high for exactly the
// first cycle of every 4-cycle update and never after LOCK, and that each
// TUNE_VALID moves the locked word by TUNE_CODE with saturation.
`timescale 1ns / 1fs
module tb_pftcg_ctrl;
  import clkgen_pkg::*;
  logic clk = 0, rst_n;
  logic up, down, tv;
  logic signed [7:0] tc;
  logic [15:0] code, step;
  logic clr_dco, clr_pfd, lock;
  ctrl_state_e st;
  int checks = 0, failures = 0;
  int unsigned X;

  always #100 clk = ~clk;   // 5 MHz reference

  assign up   = (32'(code) < X);
  assign down = (32'(code) > X);

  pftcg_ctrl dut (.clk(clk), .rst_n(rst_n), .up_i(up), .down_i(down), .tune_valid_i(tv),
                  .tune_code_i(tc), .dco_code_o(code), .clear_dco_o(clr_dco), .clear_pfd_o(clr_pfd),
                  .lock_o(lock), .step_o(step), .state_o(st));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (X=%0d code=%0d)", what, X, code); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned targets[$] = '{0, 65535, 32768, 32767, 1, 65534, 12345, 50000};

  initial begin
    tv = 0; tc = 0;
    repeat (40) targets.push_back($urandom_range(0, 65535));
    foreach (targets[i]) begin
      int cyc, t_avg, t_lock, nclr;
      X = targets[i];
      rst_n = 0;
      @(negedge clk); @(negedge clk);
      chk(code == 16'h8000 && step == 16'h4000, "start at mid word, step n/4");
      rst_n = 1;
      cyc = 0; t_avg = -1; t_lock = -1; nclr = 0;
      while (!lock && cyc < 400) begin
        @(posedge clk); #1;
        cyc++;
        if (clr_dco) nclr++;
        chk(clr_dco == (cyc % 4 == 0 && !lock), "CLEAR_DCO on the first cycle of each update");
        chk(clr_pfd == clr_dco, "CLEAR_PFD with CLEAR_DCO");
        if (t_avg < 0 && st == ST_AVG) t_avg = cyc;
      end
      t_lock = cyc;
      chk(t_avg > 0 && t_avg <= 128, $sformatf("step one within 128 cycles (took %0d)", t_avg));
      chk(lock, "LOCK reached");
      chk(t_lock - t_avg == 32, "averaging over 8 updates");
      chk((32'(code) + 1 >= X) && (32'(code) <= X + 1), "locked word within 1 LSB");
      repeat (20) begin
        @(posedge clk); #1;
        chk(!clr_dco && lock, "no clear after LOCK");
      end
      // fine tuning
      repeat (6) begin
        int exp;
        @(negedge clk);
        tv = 1; tc = 8'($urandom_range(0, 255));
        exp = int'(code) + int'(tc);
        if (exp < 0) exp = 0;
        if (exp > 65535) exp = 65535;
        @(negedge clk);
        tv = 0;
        chk(int'(code) == exp, "TUNE_CODE added to the word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
