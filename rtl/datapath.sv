// datapath: the stopwatch's counting chain.
//
// Five counter/comparator slices in a row: a TICK_W-bit tick counter that
// counts clock cycles up to TICKS_PER_HUNDREDTH-1, then four BCD digit
// slices (hundredths, tenths, seconds, tens of seconds) that count 0..9.
// The "zipper" logic between them is a ripple of enables and resets:
//   enable[0]   = mode                         (count only while running)
//   enable[i+1] = enable[i] & at_last[i]       (carry into the next slice)
//   reset[i]    = enable[i+1] | reset          (roll this slice over to 0)
// So in the cycle where the tick counter sits at 4999 while running, it
// clears and the hundredths digit advances; when a digit also sits at 9 it
// clears and the digit above advances. After 99.99 the tens digit clears
// too, so the display wraps to 00.00. All slices change together as ph1
// rises. The slice structure, widths, constants and zipper equations are
// those of the original design; only the tick count being a parameter is
// this implementation's (the chip hardwires 5000 for a 500 kHz clock).
//
// Tools that treat a latch as transparent logic report a combinational loop
// from this register's output back to its input (through the incrementers and zipper logic). The loop
// is real in the netlist but never open: the master latch (ph2) and the slave
// latch (ph1) are never transparent together, so it is cut in every phase.
module datapath
  import stopwatch_pkg::digit_t, stopwatch_pkg::mode_t, stopwatch_pkg::segs_t;
#(
  parameter int unsigned TICKS_PER_HUNDREDTH = stopwatch_pkg::TICKS_PER_HUNDREDTH,
  parameter int unsigned TICK_W              = stopwatch_pkg::TICK_W
) (
  input  logic   ph1,
  input  logic   ph2,
  input  logic   reset,
  input  logic   mode,
  output digit_t hundredths_val,
  output digit_t tenths_val,
  output digit_t secs_val,
  output digit_t tens_val
);

  localparam int unsigned NSLICE = 5;   // tick slice + four digits

  logic [NSLICE:0]   enables;           // enables[NSLICE] is the carry out of 99.99
  logic [NSLICE-1:0] resets;
  logic [NSLICE-1:0] compares;
  logic [TICK_W-1:0] ticks_val;
  digit_t            digits [NSLICE-1];

  // Tick slice: rolls over every TICKS_PER_HUNDREDTH running cycles.
  timeslice #(.WIDTH(TICK_W), .LAST(TICKS_PER_HUNDREDTH - 1)) ticks_slice (
    .ph1(ph1), .ph2(ph2), .reset(resets[0]), .enable(enables[0]),
    .value(ticks_val), .at_last(compares[0]));

  // Four identical BCD digit slices.
  for (genvar i = 1; i < NSLICE; i++) begin : g_digit
    timeslice #(.WIDTH(stopwatch_pkg::DIGIT_W), .LAST(stopwatch_pkg::DIGIT_LAST)) digit_slice (
      .ph1(ph1), .ph2(ph2), .reset(resets[i]), .enable(enables[i]),
      .value(digits[i-1]), .at_last(compares[i]));
  end

  // Zipper logic.
  assign enables[0] = mode;
  for (genvar i = 0; i < NSLICE; i++) begin : g_zip
    assign enables[i+1] = enables[i] & compares[i];
    assign resets[i]    = enables[i+1] | reset;
  end

  assign hundredths_val = digits[0];
  assign tenths_val     = digits[1];
  assign secs_val       = digits[2];
  assign tens_val       = digits[3];

endmodule
