// flop: master/slave flip-flop for a two-phase non-overlapping clock.
//
// The master latch is transparent while ph2 is high and the slave latch
// while ph1 is high. The value present on d at the end of ph2 therefore
// appears on q when ph1 next rises and stays there for a whole cycle
// (ph1 -> gap -> ph2 -> gap). This is the classic two-phase register the
// design is built from. The two phases must never be high together, or
// the pair becomes transparent end to end; assertions check that rule.
module flop #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mid;

  latch #(.WIDTH(WIDTH)) master (.ph(ph2), .d(d),   .q(mid));
  latch #(.WIDTH(WIDTH)) slave  (.ph(ph1), .d(mid), .q(q));

  // Non-overlapping clock rule.
  always @(posedge ph1) assert (!ph2) else $error("ph1 rose while ph2 high");
  always @(posedge ph2) assert (!ph1) else $error("ph2 rose while ph1 high");

endmodule
