// tb_stopwatch_pkg: checks the shared constants agree with each other:
// a hundredth at 500 kHz is 5000 ticks, the last tick value 4999 fits the
// 13-bit tick counter (and 12 bits would not suffice), a digit fits its
// type, and the mode encoding has COUNTING = 1.
`timescale 1ns / 1ns
module tb_stopwatch_pkg;
  import stopwatch_pkg::*;

  int checks = 0, failures = 0;
  digit_t d;
  segs_t  sg;
  mode_t  m;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("failed: %s", what);
    end
  endtask

  initial begin
    d = digit_t'(DIGIT_LAST);
    sg = '1;
    m = COUNTING;
    check(TICKS_PER_HUNDREDTH * 100 == CLK_HZ, "ticks per hundredth");
    check(TICKS_PER_HUNDREDTH == 5000, "5000 ticks");
    check((TICKS_PER_HUNDREDTH - 1) < (1 << TICK_W), "tick count fits");
    check((TICKS_PER_HUNDREDTH - 1) >= (1 << (TICK_W - 1)), "tick width minimal");
    check(int'(d) == 9, "digit type holds 9");
    check($bits(sg) == 7, "seven segments");
    check(m == 1'b1 && PAUSED == 1'b0, "mode encoding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
