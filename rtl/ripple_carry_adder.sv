// Ripple-carry adder: sum/cout = a + b + cin over WIDTH bits.
//
// A chain of WIDTH full adders; stage i takes the carry of stage i-1 and
// hands its own carry to stage i+1, so the carry ripples from bit 0 to the
// top bit and out as cout. The structure was chosen for its small area and
// simplicity. Purely combinational: the worst-case delay is WIDTH carry
// stages (cin or bit 0 generating a carry that propagates all the way up).
// WIDTH defaults to 8, the width of the original design; the carry chain and
// the cin input follow it, the full-adder cell is the textbook one.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = cg_adder_pkg::DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // c[i] is the carry into stage i; c[WIDTH] is the carry out.
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (c[i]),
      .s  (sum[i]),
      .co (c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
