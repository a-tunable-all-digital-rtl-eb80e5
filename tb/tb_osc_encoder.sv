// tb_osc_encoder: every codeword gives exactly one enable, at its own index.
`timescale 1ns / 1fs
module tb_osc_encoder;
  logic [10:0]   cw;
  logic [2047:0] on;
  int checks = 0, failures = 0;

  osc_encoder dut (.codeword_i(cw), .on_o(on));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2048; k++) begin
      cw = 11'(k);
      #1;
      checks++;
      if (!$onehot(on) || on[k] !== 1'b1) begin failures++; $display("FAIL codeword %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
