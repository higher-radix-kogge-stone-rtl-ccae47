// PP4: four-input parallel prefix cell, the radix-4 prefix operator.
//
// Combines four adjacent groups, index 3 the most significant:
//   G = G3 + P3*(G2 + P2*(G1 + P1*G0))
//   P = P3*P2*P1*P0     (4-input AND)
// One PP4 does the work of two levels of PP2 cells, which is where the
// radix-4 network gets its halved depth. Written as logic; the single
// complex-gate CMOS mapping is left to synthesis. Purely combinational.
module pp4_cell (
  input  logic [3:0] g_in,  // group generates, [3] most significant
  input  logic [3:0] p_in,  // group propagates, [3] most significant
  output logic       g_out, // generate of the combined range
  output logic       p_out  // propagate of the combined range
);
  assign g_out = g_in[3] | (p_in[3] & (g_in[2] | (p_in[2] & (g_in[1] | (p_in[1] & g_in[0])))));
  assign p_out = &p_in;
endmodule
