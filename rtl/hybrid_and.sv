// hybrid_and: carry-generate gate G = A & B in hybrid (pass-transistor plus
// static CMOS) style.
//
// The cell is an inverter that makes B' from B, and three transistors that steer
// the output. When B = 1, a pMOS gated by B' passes A to the output, so G = A.
// When B = 0, an nMOS gated by B' pulls the output to ground; with A = 1 a second
// nMOS gated by A also passes B (= 0), reinforcing the low level. Every input
// case therefore has a driven path, and the result is the AND of A and B
// (Table of G/P: G is 1 only for A = B = 1).
//
// The RTL keeps that structure: the inverter, then a selection of the source
// that conducts for the current inputs. The transistor arrangement is the one
// this design is based on; only its logic function is modelled here.
//
// Ports: a, b in; g out. Purely combinational, no timing.
module hybrid_and (
  input  logic a,
  input  logic b,
  output logic g
);
  logic b_n;  // output of the input inverter (p1/n1)

  assign b_n = ~b;

  always_comb begin
    if (!b_n) g = a;      // B = 1: pMOS p2 passes A
    else      g = 1'b0;   // B = 0: nMOS n3 ties G to ground (n2 passes B = 0 when A = 1)
  end
endmodule
