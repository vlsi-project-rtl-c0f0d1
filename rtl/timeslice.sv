// timeslice: one counter/comparator slice of the stopwatch datapath.
//
// A WIDTH-bit counter plus an equality comparator against the constant
// LAST. at_last is high while the count equals LAST; the datapath's zipper
// logic uses it to clear this slice and carry into the next one. Five
// slices make the datapath: a 13-bit tick slice (LAST = 4999) and four
// identical 4-bit digit slices (LAST = 9), which are the defaults here.
// Timing is that of counter: the value changes as ph1 rises; at_last is
// combinational from the value.
//
// Tools that treat a latch as transparent logic report a combinational loop
// through the counter's register and incrementer; it is never open, since
// the two latches of each register are never transparent together.
module timeslice #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned LAST  = 9
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic             reset,
  input  logic             enable,
  output logic [WIDTH-1:0] value,
  output logic             at_last
);

  localparam logic [WIDTH-1:0] LastVal = WIDTH'(LAST);

  counter    #(.WIDTH(WIDTH)) cnt  (.ph1(ph1), .ph2(ph2), .reset(reset),
                                    .enable(enable), .count(value));
  comparator #(.WIDTH(WIDTH)) comp (.val1(value), .val2(LastVal), .equals(at_last));

endmodule
