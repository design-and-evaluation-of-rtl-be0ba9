// tg_mux2: 2:1 multiplexer made of two transmission gates.
//
// Each data input reaches the output through a transmission gate (an nMOS and
// a pMOS in parallel) driven by the select signal and its complement, so that
// exactly one gate conducts at a time. The two-gate structure follows the
// reference circuit; which select level opens which gate is this design's
// choice: sel = 1 passes in1 and sel = 0 passes in0, matching the "1" and "0"
// inputs of the carry select stage, where in1 comes from the adder assuming
// carry-in 1.
//
// Ports: in0, in1, sel in; y out. Purely combinational.
module tg_mux2 (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic y
);
  always_comb begin
    if (sel) y = in1;  // gate of in1 on, gate of in0 off
    else     y = in0;  // gate of in0 on, gate of in1 off
  end
endmodule
