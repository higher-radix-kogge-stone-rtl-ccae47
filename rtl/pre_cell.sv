// Pre-processing cell of a parallel prefix adder (one per bit).
//
// A half adder: the bit generate g = a & b and the bit propagate p = a ^ b.
// The half-adder form is one of the two realisations named for this stage
// (the other being an AND and an OR gate); the XOR propagate is chosen here
// because the post-processing XOR then needs no second copy of a ^ b.
// Purely combinational, no clock.
module pre_cell (
  input  logic a,  // operand A bit
  input  logic b,  // operand B bit
  output logic g,  // generate  (G,P)^0_{i:i}
  output logic p   // propagate
);
  assign g = a & b;
  assign p = a ^ b;
endmodule
