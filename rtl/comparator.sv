// comparator: equals = (val1 == val2).
//
// In the stopwatch each counter has one of these tied to a constant (4999
// for the tick counter, 9 for a digit) to flag the last count before the
// counter must roll over and carry into the next one. Combinational.
module comparator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] val1,
  input  logic [WIDTH-1:0] val2,
  output logic             equals
);

  assign equals = (val1 == val2);

endmodule
