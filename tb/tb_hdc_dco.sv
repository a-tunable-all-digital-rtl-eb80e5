// tb_hdc_dco: checks the HDC-based DCO period for a set of 20-bit words:
// T = 1.648 ns + c1 * 3.246 ns + 64 * 1.643 ns + min(fine, 8128) * 0.78 ps.
// Word 0 must give 106.8 ns (9.4 MHz). Also checks that the ring stops while
// rst_n is low and that the fine word changes the period in 0.78 ps steps.
`timescale 1ns / 1fs
module tb_hdc_dco;
  logic rst_n;
  logic [19:0] code;
  logic clk;
  int checks = 0, failures = 0;

  hdc_dco dut (.rst_n(rst_n), .code_i(code), .clk_o(clk));

  realtime r0, per;
  initial begin r0 = 0; per = 0; end
  always @(posedge clk) begin per = $realtime - r0; r0 = $realtime; end

  function automatic real t_exp(input logic [19:0] w);
    int f;
    f = int'(w[12:0]);
    if (f > 8128) f = 8128;
    return 2 * 0.824 + real'(w[19:13]) * 3.246 + 64 * 1.643 + real'(f) * 0.00078;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] words[$] = '{20'd0, 20'd1, 20'd64, 20'd100, {7'd1, 13'd0}, {7'd29, 13'd5000},
                             {7'd127, 13'd8191}, {7'd64, 13'd4096}};
    repeat (6) words.push_back(20'($urandom));
    foreach (words[i]) begin
      rst_n = 0; code = words[i];
      #300;
      checks++;
      if (clk !== 1'b1) begin failures++; $display("FAIL ring not stopped high in reset"); end
      rst_n = 1;
      repeat (4) @(posedge clk);
      #0.0001;
      checks++;
      if (per < t_exp(code) - 0.00001 || per > t_exp(code) + 0.00001) begin
        failures++; $display("FAIL word %05h period %f expected %f", code, per, t_exp(code));
      end
      if (i == 0) begin
        checks++;
        if (per < 106.79 || per > 106.81) begin failures++; $display("FAIL word 0 period %f", per); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
