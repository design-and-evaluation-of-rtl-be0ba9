// csa32: 32-bit carry select adder built on 4-bit hybrid CLA blocks.
//
// The word is cut in two 16-bit halves. The lower half [15:0] is added by one
// 16-bit adder with the real carry-in. The upper half [31:16] is added twice at
// the same time, by two more 16-bit adders, one assuming carry-in 0 and one
// assuming carry-in 1. When the lower half's carry-out C16 is known, it only
// has to select: a 16-bit vector of transmission-gate 2:1 muxes picks the upper
// sum bits and one more 2:1 mux picks the carry-out C32. The critical path is
// therefore one 16-bit adder plus one mux, rather than two 16-bit adders.
//
// Each 16-bit adder is four 4-bit CLA blocks chained by their carries; each CLA
// uses hybrid-logic generate (AND) and propagate (XOR) cells.
//
// The design has a carry-in port cin feeding the lower adder; the source shows
// the lower adder's carry input only implicitly, so bringing it out is this
// design's choice (tie it to 0 for a plain A + B).
//
// Ports: a[31:0], b[31:0], cin in; sum[31:0], cout (= C32) out.
// Purely combinational: sum and cout follow the inputs with the gate delay only.
// An immediate assertion checks, in simulation, that the two upper candidates
// always differ by one.
module csa32
  import adder_pkg::*;
(
  input  logic [WORD_BITS-1:0] a,
  input  logic [WORD_BITS-1:0] b,
  input  logic                 cin,
  output logic [WORD_BITS-1:0] sum,
  output logic                 cout
);
  logic                 c16;                 // select bit from the lower half
  logic [HALF_BITS-1:0] s_hi0, s_hi1;        // upper sums for carry-in 0 / 1
  logic                 c32_0, c32_1;        // upper carry-outs for carry-in 0 / 1
  logic [HALF_BITS-1:0] c_lo, c_hi0, c_hi1;  // per-bit carries (not used further)

  adder16 u_lo (
    .a(a[HALF_BITS-1:0]), .b(b[HALF_BITS-1:0]), .cin(cin),
    .s(sum[HALF_BITS-1:0]), .c(c_lo), .cout(c16)
  );

  adder16 u_hi0 (
    .a(a[WORD_BITS-1:HALF_BITS]), .b(b[WORD_BITS-1:HALF_BITS]), .cin(1'b0),
    .s(s_hi0), .c(c_hi0), .cout(c32_0)
  );

  adder16 u_hi1 (
    .a(a[WORD_BITS-1:HALF_BITS]), .b(b[WORD_BITS-1:HALF_BITS]), .cin(1'b1),
    .s(s_hi1), .c(c_hi1), .cout(c32_1)
  );

  vector_mux2 #(.W(HALF_BITS)) u_sum_mux (
    .in0(s_hi0), .in1(s_hi1), .sel(c16), .y(sum[WORD_BITS-1:HALF_BITS])
  );

  tg_mux2 u_cout_mux (.in0(c32_0), .in1(c32_1), .sel(c16), .y(cout));

  // The two upper candidates must always differ by exactly one: that is what
  // makes selecting between them by C16 correct.
  always_comb begin
    assert ({c32_1, s_hi1} == {c32_0, s_hi0} + 17'd1)
      else $error("carry select candidates disagree: %h vs %h", {c32_1, s_hi1}, {c32_0, s_hi0});
  end
endmodule
