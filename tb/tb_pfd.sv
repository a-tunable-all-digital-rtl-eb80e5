// tb_pfd: self-checking test of the phase frequency detector.
// Drives the reference and feedback clocks with chosen edge offsets and
// checks the sticky UP/DOWN flags: feedback first -> UP, reference first ->
// DOWN, coincident edges -> neither, two reference edges without a feedback
// edge -> DOWN, and clear_i resets everything. Each clear is a real 0->1
// step, since a two-state start can leave clr high with no edge.
`timescale 1ns / 1fs
module tb_pfd;
  logic ref_c, fb_c, clr;
  logic up, down;
  int checks = 0, failures = 0;

  pfd dut (.ref_i(ref_c), .fb_i(fb_c), .clear_i(clr), .up_o(up), .down_o(down));

  task automatic expect_flags(input logic eu, input logic ed, input string what);
    checks++;
    if (up !== eu || down !== ed) begin
      failures++;
      $display("FAIL %s: up=%0b down=%0b expected %0b %0b", what, up, down, eu, ed);
    end
  endtask

  task automatic do_clear();
    ref_c = 0; fb_c = 0; clr = 0; #1; clr = 1; #10; clr = 0; #10;
  endtask

  // One compare: rising edges at t_ref and t_fb (ns after now), then lows.
  task automatic pulse_pair(input real t_ref, input real t_fb);
    fork
      begin #(t_ref); ref_c = 1; #50; ref_c = 0; end
      begin #(t_fb);  fb_c  = 1; #50; fb_c  = 0; end
    join
    #10;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_clear();
    expect_flags(0, 0, "after clear");
    // feedback leads by 3 ns
    pulse_pair(10.0, 7.0);
    expect_flags(1, 0, "fb leads");
    // sticky: a later pair with the opposite order does not clear UP
    do_clear();
    pulse_pair(5.0, 9.0);
    expect_flags(0, 1, "fb lags");
    do_clear();
    pulse_pair(5.0, 5.0);
    expect_flags(0, 0, "coincident (dead zone)");
    do_clear();
    // tiny lead of 1 ps is still resolved
    pulse_pair(20.0, 19.999);
    expect_flags(1, 0, "fb leads by 1 ps");
    do_clear();
    // two reference edges, no feedback edge: DOWN
    pulse_pair(5.0, 1000.0);
    expect_flags(0, 1, "ref edge then fb much later");
    do_clear();
    fork
      begin #5; ref_c = 1; #20; ref_c = 0; #20; ref_c = 1; #20; ref_c = 0; end
    join
    expect_flags(0, 1, "two ref edges without fb");
    do_clear();
    fork
      begin #5; fb_c = 1; #20; fb_c = 0; #20; fb_c = 1; #20; fb_c = 0; end
    join
    expect_flags(1, 0, "two fb edges without ref");
    // clear resets the flags
    do_clear();
    expect_flags(0, 0, "clear");
    // several lead cycles keep UP, no DOWN
    repeat (4) pulse_pair(10.0, 8.0);
    expect_flags(1, 0, "repeated lead");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
