// tb_pvt_encoder: every thermometer code 0..84 and random vectors; the index
// must equal the number of set bits.
`timescale 1ns / 1fs
module tb_pvt_encoder;
  logic [83:0] up;
  logic [6:0]  idx;
  int checks = 0, failures = 0;

  pvt_encoder dut (.up_i(up), .idx_o(idx));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 84; k++) begin
      up = '0;
      for (int i = 0; i < k; i++) up[i] = 1'b1;
      #1;
      checks++;
      if (int'(idx) != k) begin failures++; $display("FAIL thermometer %0d gave %0d", k, idx); end
    end
    repeat (500) begin
      int n;
      up = {$urandom, $urandom, $urandom};
      n = 0;
      for (int i = 0; i < 84; i++) n += int'(up[i]);
      #1;
      checks++;
      if (int'(idx) != n) begin failures++; $display("FAIL random gave %0d expected %0d", idx, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
