// One-bit full adder, the stage cell of the ripple-carry adder.
//
// sum = a ^ b ^ ci and co = a&b | ci&(a^b): the carry is generated when both
// inputs are set and propagated when exactly one is. Purely combinational, no
// clock; delay is one XOR level to the propagate term and one AND-OR to co.
// The gate equations are the textbook cell; the design only calls for a
// ripple-carry chain and does not specify the cell.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;  // propagate

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (ci & p);
  end

endmodule
