// controller: run/pause mode and the four display decoders.
//
// Two one-bit two-phase registers track the buttons. helddown holds the
// previous cycle's startstop, so startstop & ~helddown is high for exactly
// one cycle per press; that pulse toggles the mode register between
// PAUSED (0) and COUNTING (1). Holding the button down therefore toggles
// only once. reset clears both registers (mode = PAUSED) and wins over a
// press in the same cycle; a button still held when reset is released
// counts as a fresh press. mode changes as ph1 rises. The four BCD digits
// from the datapath pass through sevenseg decoders (combinational). The
// edge-detect and toggle scheme is the original design's; buttons are
// assumed debounced off chip.
//
// Tools that treat a latch as transparent logic report a combinational loop
// from this register's output back to its input (through the toggle logic of the mode register). The loop
// is real in the netlist but never open: the master latch (ph2) and the slave
// latch (ph1) are never transparent together, so it is cut in every phase.
module controller
  import stopwatch_pkg::*;
#(
  parameter bit SEG_ACTIVE_LOW = 1'b1
) (
  input  logic   ph1,
  input  logic   ph2,
  input  logic   reset,
  input  logic   startstop,
  input  digit_t hundredths_val,
  input  digit_t tenths_val,
  input  digit_t secs_val,
  input  digit_t tens_val,
  output mode_t  mode,
  output segs_t  hundredths,
  output segs_t  tenths,
  output segs_t  secs,
  output segs_t  tens
);

  logic  helddown;
  logic  press;
  logic  mode_q;
  mode_t newmode;

  assign press   = startstop & ~helddown;
  assign newmode = press ? mode_t'(~mode) : mode;
  assign mode    = mode_t'(mode_q);

  flopr #(.WIDTH(1)) modeflop (.ph1(ph1), .ph2(ph2), .reset(reset),
                               .d(newmode), .q(mode_q));
  flopr #(.WIDTH(1)) heldflop (.ph1(ph1), .ph2(ph2), .reset(reset),
                               .d(startstop), .q(helddown));

  sevenseg #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) hundredths_7seg (.s(hundredths_val), .segs(hundredths));
  sevenseg #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) tenths_7seg     (.s(tenths_val),     .segs(tenths));
  sevenseg #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) secs_7seg       (.s(secs_val),       .segs(secs));
  sevenseg #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) tens_7seg       (.s(tens_val),       .segs(tens));

endmodule
