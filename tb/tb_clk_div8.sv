// tb_clk_div8: output period is eight input periods with 50 % duty; reset
// holds the output low and the first output rise comes on the fourth input
// rise after release.
`timescale 1ns / 1fs
module tb_clk_div8;
  logic rst_n, clk = 0, out;
  int checks = 0, failures = 0;
  int nin;

  always #12.5 clk = ~clk;

  clk_div8 dut (.rst_n(rst_n), .clk_i(clk), .clk_o(out));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    #101;
    checks++;
    if (out !== 1'b0) failures++;
    rst_n = 1;
    nin = 0;
    while (out !== 1'b1) begin @(posedge clk); nin++; #1; end
    checks++;
    if (nin != 4) begin failures++; $display("FAIL first rise after %0d input edges", nin); end
    repeat (10) begin
      realtime tr, tf;
      @(posedge out); tr = $realtime;
      @(negedge out); tf = $realtime;
      @(posedge out);
      checks++;
      if ($realtime - tr < 199.99 || $realtime - tr > 200.01 || tf - tr < 99.99 || tf - tr > 100.01) begin
        failures++; $display("FAIL period %f high %f", $realtime - tr, tf - tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
