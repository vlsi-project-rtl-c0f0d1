// halfadd: one-bit half adder, sum = a XOR b, carry = a AND b.
//
// It is the bit cell of the counters' incrementer: a ripple chain of
// half adders adds a single carry-in bit to a register value. The design
// names this cell (with its XOR sub-cell) but does not print its logic;
// the standard half-adder equations are used. Purely combinational.
module halfadd (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
