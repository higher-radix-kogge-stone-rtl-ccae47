// PP2: two-input parallel prefix cell, the radix-2 prefix operator.
//
// Combines a more significant group (index 1) with the adjacent less
// significant group (index 0):
//   G = G1 + P1*G0      (AND-OR gate)
//   P = P1*P0           (AND gate sharing the inputs)
// Purely combinational.
module pp2_cell (
  input  logic [1:0] g_in,  // group generates, [1] most significant
  input  logic [1:0] p_in,  // group propagates, [1] most significant
  output logic       g_out, // generate of the combined range
  output logic       p_out  // propagate of the combined range
);
  assign g_out = g_in[1] | (p_in[1] & g_in[0]);
  assign p_out = &p_in;
endmodule
