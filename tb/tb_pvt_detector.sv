// tb_pvt_detector: runs the detector at four operating points (different
// cell delays) and checks the lead/lag pattern of all 84 pairs against
// (292 + i) * D_BUF < 82 * D_ND, the done flag, the response time (under
// 100 ns) and the clearing by enable low followed by a second detection.
`timescale 1ns / 1fs
module tb_pvt_detector;
  localparam int NP = 84;
  localparam real DND [4] = '{0.36, 0.40, 0.31, 0.45};
  localparam real DBUF[4] = '{0.09, 0.0905, 0.0902, 0.1};
  logic en;
  logic [NP-1:0] up [4];
  logic [NP-1:0] dn [4];
  logic [3:0]    done;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 4; c++) begin : g_c
    pvt_detector #(.D_ND_NS(DND[c]), .D_BUF_NS(DBUF[c])) dut (
      .enable_i(en), .up_o(up[c]), .down_o(dn[c]), .done_o(done[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    // start-up: a short enable pulse gives the clear input a rising edge
    en = 1;
    #0.1 en = 0;
    #50;
    repeat (2) begin
      checks++;
      if (done !== 4'b0) begin failures++; $display("FAIL done while disabled"); end
      en = 1; t0 = $realtime;
      wait (&done);
      checks++;
      if ($realtime - t0 >= 100.0) begin failures++; $display("FAIL response %f ns", $realtime - t0); end
      #1;
      for (int c = 0; c < 4; c++) begin
        int ups;
        ups = 0;
        for (int i = 0; i < NP; i++) begin
          logic e_up;
          real dv, dr;
          logic tie;
          dv = real'(292 + i) * DBUF[c];
          dr = 82.0 * DND[c];
          tie = (dv - dr < 1.0e-6) && (dr - dv < 1.0e-6);
          e_up = !tie && (dv < dr);
          checks++;
          // two edges at the same instant reset the detector: no flag
          if (up[c][i] !== e_up || dn[c][i] !== (!e_up && !tie)) begin
            failures++; $display("FAIL corner %0d pair %0d up=%b dn=%b", c, i, up[c][i], dn[c][i]);
          end
          ups += int'(e_up);
        end
        $display("corner %0d: R=%f, %0d pairs lead", c, DBUF[c] / DND[c], ups);
      end
      en = 0;
      #1;
      checks++;
      if (up[0] !== '0 || dn[0] !== '0) begin failures++; $display("FAIL not cleared"); end
      #200;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
