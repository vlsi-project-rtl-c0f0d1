// counter: WIDTH-bit up counter on the two-phase clock.
//
// A resettable two-phase register (flopr) feeds an incrementer whose
// output is the register's next value, so the count advances by one per
// clock cycle while enable is high and holds while it is low. reset
// (synchronous) clears it to zero and wins over enable. The count changes
// when ph1 rises, from inputs sampled during ph2. Without a reset the
// count wraps modulo 2^WIDTH. Structure as in the original design.
//
// Tools that treat a latch as transparent logic report a combinational loop
// from this register's output back to its input (through the incrementer). The loop
// is real in the netlist but never open: the master latch (ph2) and the slave
// latch (ph1) are never transparent together, so it is cut in every phase.
module counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic             reset,
  input  logic             enable,
  output logic [WIDTH-1:0] count
);

  logic [WIDTH-1:0] newval;

  flopr       #(.WIDTH(WIDTH)) countflop (.ph1(ph1), .ph2(ph2), .reset(reset),
                                          .d(newval), .q(count));
  incrementer #(.WIDTH(WIDTH)) countinc  (.valin(count), .increment(enable),
                                          .valout(newval));

endmodule
