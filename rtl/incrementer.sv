// incrementer: valout = valin + increment (modulo 2^WIDTH).
//
// Built as a ripple chain of half adders, one per bit: the increment bit
// is the carry into bit 0 and each cell's carry feeds the next bit. This
// mirrors the one-bit register+adder slices of the hand-drawn counter;
// the chain structure is this implementation's reading of those cell
// names. Purely combinational; the carry out of the top bit is dropped.
module incrementer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] valin,
  input  logic             increment,
  output logic [WIDTH-1:0] valout
);

  logic [WIDTH:0] carry;

  assign carry[0] = increment;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    halfadd ha (.a(valin[i]), .b(carry[i]), .s(valout[i]), .c(carry[i+1]));
  end

endmodule
