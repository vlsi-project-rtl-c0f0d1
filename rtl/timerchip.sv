// timerchip: stopwatch chip counting 00.00 to 99.99 seconds.
//
// The chip is clocked by a non-overlapping two-phase clock (ph1, ph2) of a
// known rate, 500 kHz by default, and counts its cycles: every
// TICKS_PER_HUNDREDTH cycles (5000) the hundredths digit advances, and
// digits carry decimally into tenths, seconds and tens of seconds. It has
// two parts. The datapath is the regular part: five counter/comparator
// slices chained by enable/reset "zipper" logic. The controller is the
// irregular part: the run/pause mode register, toggled once per press of
// startstop, and four seven-segment decoders driving the output buses.
//
// Interface: reset (synchronous, active high) clears the time to 00.00 and
// pauses; the display stays at 00.00 until startstop is pressed. A press
// while paused starts counting, a press while counting pauses, and the
// display keeps the last time. Each output bus is ordered G..A and is
// active low by default (SEG_ACTIVE_LOW). All state changes as ph1 rises,
// from inputs sampled while ph2 is high. Counting starts two cycles after
// the press is sampled (mode register, then tick counter). After 99.99 the
// time wraps to 00.00 and keeps counting.
//
// Structure, widths, constants and behaviour follow the original design;
// the parameters are this implementation's, with the original numbers as
// defaults. Supply pins and the pad ring are not part of this RTL.
//
// Tools that treat a latch as transparent logic report a combinational loop
// from this register's output back to its input (through the mode register, datapath and zipper logic). The loop
// is real in the netlist but never open: the master latch (ph2) and the slave
// latch (ph1) are never transparent together, so it is cut in every phase.
module timerchip
  import stopwatch_pkg::digit_t, stopwatch_pkg::mode_t, stopwatch_pkg::segs_t;
#(
  parameter int unsigned TICKS_PER_HUNDREDTH = stopwatch_pkg::TICKS_PER_HUNDREDTH,
  parameter int unsigned TICK_W              = stopwatch_pkg::TICK_W,
  parameter bit          SEG_ACTIVE_LOW      = 1'b1
) (
  input  logic  ph1,
  input  logic  ph2,
  input  logic  reset,
  input  logic  startstop,
  output segs_t hundredths,
  output segs_t tenths,
  output segs_t secs,
  output segs_t tens
);

  mode_t  mode;
  digit_t hundredths_val, tenths_val, secs_val, tens_val;

  datapath #(
    .TICKS_PER_HUNDREDTH(TICKS_PER_HUNDREDTH),
    .TICK_W             (TICK_W)
  ) u_datapath (
    .ph1(ph1), .ph2(ph2), .reset(reset), .mode(mode),
    .hundredths_val(hundredths_val), .tenths_val(tenths_val),
    .secs_val(secs_val), .tens_val(tens_val));

  controller #(
    .SEG_ACTIVE_LOW(SEG_ACTIVE_LOW)
  ) u_controller (
    .ph1(ph1), .ph2(ph2), .reset(reset), .startstop(startstop),
    .hundredths_val(hundredths_val), .tenths_val(tenths_val),
    .secs_val(secs_val), .tens_val(tens_val),
    .mode(mode),
    .hundredths(hundredths), .tenths(tenths), .secs(secs), .tens(tens));

endmodule
