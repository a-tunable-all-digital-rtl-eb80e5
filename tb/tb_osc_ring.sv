// tb_osc_ring: ring period 2*(0.2 ns + (k+1)*20 ps) for tap k, stop in
// reset, first rise half a period after release, and a tap change while
// running.
`timescale 1ns / 1fs
module tb_osc_ring;
  logic rst_n;
  logic [2047:0] on;
  logic ring;
  int checks = 0, failures = 0;

  osc_ring dut (.rst_n(rst_n), .on_i(on), .ring_o(ring));

  realtime r0, per;
  initial begin r0 = 0; per = 0; end
  always @(posedge ring) begin per = $realtime - r0; r0 = $realtime; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int taps[$] = '{0, 1, 614, 1000, 2047, 37};
    foreach (taps[i]) begin
      realtime t0;
      real half;
      half = 0.2 + (taps[i] + 1) * 0.02;
      rst_n = 0; on = '0; on[taps[i]] = 1'b1;
      #(3 * half + 1);
      chk(ring === 1'b0, "ring low in reset");
      rst_n = 1; t0 = $realtime;
      @(posedge ring);
      chk($realtime - t0 > half - 0.00001 && $realtime - t0 < half + 0.00001, "first rise");
      repeat (3) @(posedge ring);
      #0.00001;
      chk(per > 2 * half - 0.00001 && per < 2 * half + 0.00001, $sformatf("period tap %0d", taps[i]));
    end
    // tap change while running
    on = '0; on[100] = 1'b1;
    repeat (3) @(posedge ring);
    #0.00001;
    chk(per > 2 * (0.2 + 101 * 0.02) - 0.00001 && per < 2 * (0.2 + 101 * 0.02) + 0.00001, "period after tap change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
