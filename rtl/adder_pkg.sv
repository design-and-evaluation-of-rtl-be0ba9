// adder_pkg: word sizes shared by the carry select adder and its building blocks.
//
// The 32-bit adder is split into two 16-bit halves, and each 16-bit adder is a
// chain of 4-bit carry look-ahead (CLA) blocks. These three sizes are the ones
// the design is built around; they are collected here so the modules agree on
// them. There is no clock or state anywhere in the adder.
package adder_pkg;
  localparam int unsigned CLA_BITS  = 4;              // bits per CLA block
  localparam int unsigned HALF_BITS = 16;             // bits per 16-bit adder
  localparam int unsigned WORD_BITS = 2 * HALF_BITS;  // full adder word
  localparam int unsigned CLAS_PER_HALF = HALF_BITS / CLA_BITS;
endpackage
