// tb_dco_encoder: checks the DCO word to ON1/ON2/ON3 encoding for every
// 16-bit word: ON1 and ON2 are thermometer codes with their zeros counting
// the coarse and middle fields, ON3 has exactly c3 ones at the bottom.
`timescale 1ns / 1fs
module tb_dco_encoder;
  import clkgen_pkg::*;
  dco_code_t        code;
  logic [N_ON1-1:0] on1;
  logic [N_ON2-1:0] on2;
  logic [N_ON3-1:0] on3;
  int checks = 0, failures = 0;

  dco_encoder dut (.dco_code_i(code), .on1_o(on1), .on2_o(on2), .on3_o(on3));

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < (1 << CODE_BITS); w++) begin
      logic [N_ON1-1:0] e1;
      logic [N_ON2-1:0] e2;
      logic [N_ON3-1:0] e3;
      int c1, c2, c3;
      code = dco_code_t'(w[CODE_BITS-1:0]);
      c1 = w >> (C2_BITS + C3_BITS);
      c2 = (w >> C3_BITS) & ((1 << C2_BITS) - 1);
      c3 = w & ((1 << C3_BITS) - 1);
      e1 = '1; e1 = e1 << c1;
      e2 = '1; e2 = e2 << c2;
      e3 = '0;
      for (int j = 0; j < c3; j++) e3[j] = 1'b1;
      #1;
      checks++;
      if (on1 !== e1 || on2 !== e2 || on3 !== e3) begin
        failures++;
        if (failures < 10) $display("FAIL word %04h: on1=%h on2=%h", w, on1, on2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
