// tb_hdc_cell: checks the delay-tunable HDC model: inverting, and each edge
// delayed by half of 1.643 ns + code * 0.78 ps, so rise plus fall delay
// equals the specified cell delay for every code.
`timescale 1ns / 1fs
module tb_hdc_cell;
  logic in_s, out_s;
  logic [6:0] ctrl;
  int checks = 0, failures = 0;

  hdc_cell dut (.in_i(in_s), .ctrl_i(ctrl), .out_o(out_s));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_s = 0; ctrl = 0;
    #10;
    for (int c = 0; c < 128; c++) begin
      realtime t0, dr, df;
      real expd;
      ctrl = 7'(c);
      expd = 1.643 + c * 0.00078;
      #5;
      checks++;
      if (out_s !== ~in_s) begin failures++; $display("FAIL not inverting"); end
      in_s = 1; t0 = $realtime;
      @(out_s); df = $realtime - t0;
      checks++;
      if (out_s !== 1'b0) begin failures++; $display("FAIL output not low"); end
      #5;
      in_s = 0; t0 = $realtime;
      @(out_s); dr = $realtime - t0;
      checks++;
      if ((dr + df) < expd - 0.000002 || (dr + df) > expd + 0.000002) begin
        failures++; $display("FAIL code %0d cell delay %f expected %f", c, dr + df, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
