// latch: WIDTH-bit level-sensitive latch for two-phase clocking.
//
// While the phase input ph is high the latch is transparent (q follows d);
// while ph is low q holds the last value seen. Two of these, on the two
// non-overlapping phases, make the master/slave flip-flop (see flop).
// The latch is intentional: the whole chip is built from two-phase latches,
// as in the original design, so latch warnings on this module are expected.
// Lint may also call always_latch with a nonblocking assignment
// "combinational"; the nonblocking form is kept as the usual latch idiom.
module latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch
    if (ph) q <= d;

endmodule
