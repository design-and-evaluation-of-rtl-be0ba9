// cla4_hybrid: the 4-bit carry look-ahead adder that is the basic unit of the
// 32-bit carry select adder.
//
// Per bit position i it makes the generate term G_i = A_i B_i with a hybrid AND
// cell and the propagate term P_i = A_i ^ B_i with a hybrid XOR cell. The
// look-ahead block turns G, P and the carry-in C0 into the carries C1..C4 at
// once. The sum is the second XOR of a two-XOR cascade, S_i = P_i ^ C_i, where
// the first XOR of the cascade is the propagate cell itself. Using the hybrid
// XOR cell for the sum too is this design's choice.
//
// Ports: a[3:0], b[3:0], cin in; s[3:0] sum, c[3:0] the carry into each bit
// position (c[0] = cin), cout = C4. Purely combinational.
module cla4_hybrid
  import adder_pkg::*;
(
  input  logic [CLA_BITS-1:0] a,
  input  logic [CLA_BITS-1:0] b,
  input  logic                cin,
  output logic [CLA_BITS-1:0] s,
  output logic [CLA_BITS-1:0] c,
  output logic                cout
);
  logic [CLA_BITS-1:0] g, p;
  logic [CLA_BITS:1]   carry;

  for (genvar i = 0; i < CLA_BITS; i++) begin : g_bit
    hybrid_and u_gen (.a(a[i]), .b(b[i]), .g(g[i]));
    hybrid_xor u_prop(.a(a[i]), .b(b[i]), .p(p[i]));
  end

  cla_carry4 u_carry (.g(g), .p(p), .c0(cin), .c(carry));

  assign c    = {carry[CLA_BITS-1:1], cin};
  assign cout = carry[CLA_BITS];

  for (genvar i = 0; i < CLA_BITS; i++) begin : g_sum
    hybrid_xor u_sum (.a(p[i]), .b(c[i]), .p(s[i]));
  end
endmodule
