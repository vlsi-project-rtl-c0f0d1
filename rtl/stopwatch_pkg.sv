// stopwatch_pkg: types and constants shared by the stopwatch chip.
//
// The chip counts ticks of a 500 kHz two-phase clock. One hundredth of a
// second is 5000 ticks, so the tick counter is 13 bits wide and rolls over
// after reaching 4999. The four display digits are BCD (0..9) and each one
// drives a seven-segment display through a 7-bit bus ordered G..A
// (bit 0 = segment A, the top bar; bit 6 = segment G, the middle bar).
// The clock rate, the tick count and the 13-bit width are the design's
// published numbers; the type names and the mode encoding are this
// implementation's own.
package stopwatch_pkg;

  localparam int unsigned CLK_HZ              = 500_000;
  localparam int unsigned TICKS_PER_HUNDREDTH = CLK_HZ / 100;   // 5000
  localparam int unsigned TICK_W              = 13;
  localparam int unsigned DIGIT_W             = 4;
  localparam int unsigned DIGIT_LAST          = 9;
  localparam int unsigned SEG_W               = 7;

  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [SEG_W-1:0]   segs_t;

  // Run/pause state held by the controller's mode register.
  typedef enum logic {
    PAUSED   = 1'b0,
    COUNTING = 1'b1
  } mode_t;

endpackage
