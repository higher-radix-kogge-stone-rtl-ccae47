// Post-processing cell of a parallel prefix adder (one per bit).
//
// The sum bit is the bit propagate XOR the carry into the bit:
//   s_i = p_i ^ G_{i-1:0}
// For bit 0 the carry input is tied to 0 by the adder (no carry-in).
// Purely combinational.
module post_cell (
  input  logic p,      // bit propagate a_i ^ b_i
  input  logic c_in,   // carry into this bit, G_{i-1:0}
  output logic s       // sum bit
);
  assign s = p ^ c_in;
endmodule
