// PP3: three-input parallel prefix cell, used by radix-3 and radix-4
// networks.
//
// Combines three adjacent groups, index 2 the most significant:
//   G = G2 + P2*(G1 + P1*G0)
//   P = P2*P1*P0        (3-input AND)
// This is the function of a single complex CMOS gate plus output inverter;
// here it is written as logic and the gate mapping is left to synthesis.
// Purely combinational.
module pp3_cell (
  input  logic [2:0] g_in,  // group generates, [2] most significant
  input  logic [2:0] p_in,  // group propagates, [2] most significant
  output logic       g_out, // generate of the combined range
  output logic       p_out  // propagate of the combined range
);
  assign g_out = g_in[2] | (p_in[2] & (g_in[1] | (p_in[1] & g_in[0])));
  assign p_out = &p_in;
endmodule
