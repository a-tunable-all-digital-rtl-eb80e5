// tb_gfcmux: glitch-free switching among eight 5 MHz phases 25 ns apart.
// The select is changed at random times to random sources. Checks: no high
// pulse on the output shorter than a full source high time (100 ns), no low
// gap shorter than the shortest source low time, at most one source flip-flop
// active at a time, and, once the switch has settled, the output equal to
// the selected source; the second rising output edge after a select change
// comes from the new source.
`timescale 1ns / 1fs
module tb_gfcmux;
  localparam int N = 8;
  localparam real T = 200.0;
  logic         rst_n;
  logic [N-1:0] clk;
  logic [2:0]   sel;
  logic         out;
  logic [N-1:0] act;
  int checks = 0, failures = 0;
  int switches = 0;

  gfcmux #(.N(N)) dut (.rst_n(rst_n), .clk_i(clk), .sel_i(sel), .clk_o(out), .active_o(act));

  // Eight phases, phase k rises at k*T/8.
  initial begin
    clk = '0;
    forever begin
      for (int s = 0; s < N; s++) begin
        clk[s] = 1'b1;
        clk[(s + N/2) % N] = 1'b0;
        #(T / N);
      end
    end
  end

  // Pulse-width monitor on the output.
  realtime t_rise, t_fall;
  initial begin t_rise = 0; t_fall = 0; end
  always @(posedge out) begin
    if (t_fall > 0 && $realtime - t_fall < T / 2.0 - 0.001) begin
      failures++; $display("FAIL short low %f at %t", $realtime - t_fall, $realtime);
    end
    checks++;
    t_rise = $realtime;
  end
  always @(negedge out) begin
    checks++;
    if ($realtime - t_rise < T / 2.0 - 0.001) begin
      failures++; $display("FAIL short high %f at %t", $realtime - t_rise, $realtime);
    end
    t_fall = $realtime;
  end

  always @(act) begin
    checks++;
    if (rst_n && !$onehot0(act)) begin failures++; $display("FAIL two sources active %b", act); end
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; sel = 3'd0;
    #333; rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [2:0] nsel;
      #($urandom_range(50, 1500) + $urandom_range(0, 999) / 1000.0);
      nsel = 3'($urandom_range(0, N - 1));
      if (nsel != sel) switches++;
      sel = nsel;
      // second rising edge of the output after the change is from the new source
      @(posedge out); @(posedge out);
      checks++;
      if (clk[sel] !== 1'b1) begin failures++; $display("FAIL 2nd edge not from source %0d", sel); end
      // settled: output follows the selected source for a full period
      for (int k = 0; k < 16; k++) begin
        #(T / 16.0 - 0.5);
        checks++;
        if (out !== clk[sel]) begin failures++; $display("FAIL out != clk[%0d] at %t", sel, $realtime); end
        #0.5;
      end
    end
    checks++;
    if (switches < 100) failures++;
    $display("switches=%0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
