// hybrid_xor: carry-propagate gate P = A ^ B in hybrid style, four transistors.
//
// Two pMOS pass transistors cross-couple the inputs: one, gated by B, passes A to
// the output when B = 0; the other, gated by A, passes B when A = 0. With both
// inputs 0 both pass a 0. The only case no pMOS handles, A = B = 1, is covered by
// two series nMOS (gated by B and by A) that pull the output to ground. The four
// cases give the XOR of A and B.
//
// The RTL follows that case split; the circuit is the one this design is based
// on and only its logic function is modelled. The same cell is used both for the
// propagate term and for the sum XOR of the CLA.
//
// Ports: a, b in; p out. Purely combinational, no timing.
module hybrid_xor (
  input  logic a,
  input  logic b,
  output logic p
);
  always_comb begin
    if (!b)      p = a;     // pMOS p4 (gate B) passes A
    else if (!a) p = b;     // pMOS p5 (gate A) passes B
    else         p = 1'b0;  // A = B = 1: series nMOS n4, n5 to ground
  end
endmodule
