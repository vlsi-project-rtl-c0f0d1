// flopr: two-phase flip-flop with synchronous reset.
//
// A 2:1 multiplexer in front of a master/slave flop (see flop) selects
// zero instead of d while reset is high, so the register clears at the
// next ph1 after reset is seen during ph2. Reset is synchronous: it acts
// only through the clocked latches. Structure follows the original design
// (reset mux + flop); the mux is written inline here.
module flopr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] d2;

  assign d2 = reset ? '0 : d;

  flop #(.WIDTH(WIDTH)) f (.ph1(ph1), .ph2(ph2), .d(d2), .q(q));

endmodule
