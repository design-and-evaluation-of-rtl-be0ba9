// cla_carry4: look-ahead carry terms of a 4-bit CLA.
//
// From the generate terms G_i = A_i B_i and propagate terms P_i = A_i ^ B_i of
// four bit positions and the carry-in C0, it forms the carries C1..C4 defined by
// C_{i+1} = G_i + P_i C_i. Each carry is built as its own complex gate in
// expanded (sum of products) form, not by rippling through the lower carries:
//   C_k = G_{k-1} + P_{k-1} G_{k-2} + ... + P_{k-1}..P_1 G_0 + P_{k-1}..P_0 C0.
// This mirrors the four separate carry circuits C1, C2, C3 and C4 of the
// design, which all take their inputs directly from the G, P and C0 signals.
//
// Ports: g[3:0], p[3:0], c0 in; c[4:1] out (c[4] is the block's carry-out).
// Purely combinational.
module cla_carry4
  import adder_pkg::*;
(
  input  logic [CLA_BITS-1:0] g,
  input  logic [CLA_BITS-1:0] p,
  input  logic                c0,
  output logic [CLA_BITS:1]   c
);
  always_comb begin
    for (int k = 1; k <= CLA_BITS; k++) begin
      logic term;
      logic ck;
      // carry-in term: C0 propagated through positions 0..k-1
      term = c0;
      for (int m = 0; m < k; m++) term = term & p[m];
      ck = term;
      // generate terms: G_j propagated through positions j+1..k-1
      for (int j = 0; j < k; j++) begin
        term = g[j];
        for (int m = j + 1; m < k; m++) term = term & p[m];
        ck = ck | term;
      end
      c[k] = ck;
    end
  end
endmodule
