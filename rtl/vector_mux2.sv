// vector_mux2: W-bit 2:1 vector multiplexer, one transmission-gate mux per bit.
//
// All bits share one select line. In the carry select adder it picks the upper
// 16 sum bits from one of the two precomputed upper halves, steered by the
// carry C16 out of the lower half. The default width, 16, is the number of
// single-bit muxes the vector mux is said to be equivalent to.
//
// Ports: in0[W-1:0], in1[W-1:0], sel in; y[W-1:0] out (sel = 1 selects in1).
// Purely combinational.
module vector_mux2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         sel,
  output logic [W-1:0] y
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    tg_mux2 u_mux (.in0(in0[i]), .in1(in1[i]), .sel(sel), .y(y[i]));
  end
endmodule
