// adder16: 16-bit adder built from four 4-bit hybrid CLA blocks.
//
// The CLA blocks are chained: the carry-out C4 of one block is the carry-in of
// the next, giving the intermediate carries C4, C8, C12 and the carry-out C16.
// Inside each block the carries are looked ahead; between blocks they ripple.
// The carry into every bit position is brought out as well.
//
// Ports: a[15:0], b[15:0], cin in; s[15:0] sum, c[15:0] the carry into each bit
// position (c[0] = cin), cout = C16. Purely combinational.
module adder16
  import adder_pkg::*;
(
  input  logic [HALF_BITS-1:0] a,
  input  logic [HALF_BITS-1:0] b,
  input  logic                 cin,
  output logic [HALF_BITS-1:0] s,
  output logic [HALF_BITS-1:0] c,
  output logic                 cout
);
  logic [CLAS_PER_HALF:0] blk_c;  // carries between blocks: C0, C4, C8, C12, C16

  assign blk_c[0] = cin;

  for (genvar k = 0; k < CLAS_PER_HALF; k++) begin : g_cla
    cla4_hybrid u_cla (
      .a   (a[k*CLA_BITS +: CLA_BITS]),
      .b   (b[k*CLA_BITS +: CLA_BITS]),
      .cin (blk_c[k]),
      .s   (s[k*CLA_BITS +: CLA_BITS]),
      .c   (c[k*CLA_BITS +: CLA_BITS]),
      .cout(blk_c[k+1])
    );
  end

  assign cout = blk_c[CLAS_PER_HALF];
endmodule
