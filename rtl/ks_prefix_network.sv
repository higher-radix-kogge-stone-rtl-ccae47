// Higher-radix Kogge-Stone carry-lookahead (prefix) network.
//
// Takes the bit generate/propagate pairs (g_i, p_i) and returns, for every
// bit i, the group generate G_{i:0} (the carry out of bit i) and the group
// propagate P_{i:0}.
//
// Structure: LEVELS = ceil(log_RADIX WIDTH) levels of prefix nodes, one node
// per bit per level. At level k the span is RADIX**k, and node i combines the
// groups of the previous level ending at bits i, i-span, ..., i-(RADIX-1)*span,
// as many as have a non-negative index (hrks_pkg::cell_fanin). Node i of
// level k therefore covers bits i down to max(0, i-RADIX**(k+1)+1), and after
// the last level every node covers i:0. A node with one group is a vacant
// (dummy) position, a plain wire here; nodes with 2, 3 or 4 groups are PP2,
// PP3 and PP4 cells. Every node output drives at most RADIX nodes of the next
// level, the bounded fan-out that distinguishes Kogge-Stone from Sklansky.
//
// For RADIX = 4, WIDTH = 64 this gives 3 levels with 129 PP4, 21 PP3 and
// 21 PP2 cells; for RADIX = 3 it gives 4 levels with 176 PP3 and 40 PP2
// cells. RADIX = 2 (the classic Kogge-Stone network) is accepted too.
// RADIX is limited to 2..4 because PP4 is the largest cell.
//
// Purely combinational; the delay is LEVELS cell delays.
module ks_prefix_network #(
  parameter int unsigned WIDTH = 64,  // operand bits
  parameter int unsigned RADIX = 4    // cell inputs per node: 2, 3 or 4
) (
  input  logic [WIDTH-1:0] g,      // bit generates
  input  logic [WIDTH-1:0] p,      // bit propagates
  output logic [WIDTH-1:0] g_pfx,  // G_{i:0}: carry out of bit i
  output logic [WIDTH-1:0] p_pfx   // P_{i:0}
);
  import hrks_pkg::*;

  localparam int unsigned LEVELS = num_levels(RADIX, WIDTH);

  // Node outputs per level; level 0 holds the inputs.
  logic [WIDTH-1:0] g_lvl [LEVELS+1];
  logic [WIDTH-1:0] p_lvl [LEVELS+1];

  assign g_lvl[0] = g;
  assign p_lvl[0] = p;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned SPAN = ipow(RADIX, k);
    for (genvar i = 0; i < WIDTH; i++) begin : g_node
      localparam int unsigned M = cell_fanin(RADIX, k, i);
      // Inputs of this node, [0] the least significant group.
      logic [M-1:0] gi;
      logic [M-1:0] pi;
      for (genvar j = 0; j < M; j++) begin : g_tap
        assign gi[M-1-j] = g_lvl[k][i - j*SPAN];
        assign pi[M-1-j] = p_lvl[k][i - j*SPAN];
      end
      if (M == 1) begin : g_dummy
        assign g_lvl[k+1][i] = gi[0];
        assign p_lvl[k+1][i] = pi[0];
      end else if (M == 2) begin : g_pp2
        pp2_cell u_cell (.g_in(gi), .p_in(pi), .g_out(g_lvl[k+1][i]), .p_out(p_lvl[k+1][i]));
      end else if (M == 3) begin : g_pp3
        pp3_cell u_cell (.g_in(gi), .p_in(pi), .g_out(g_lvl[k+1][i]), .p_out(p_lvl[k+1][i]));
      end else begin : g_pp4
        pp4_cell u_cell (.g_in(gi), .p_in(pi), .g_out(g_lvl[k+1][i]), .p_out(p_lvl[k+1][i]));
      end
    end
  end

  assign g_pfx = g_lvl[LEVELS];
  assign p_pfx = p_lvl[LEVELS];

  initial begin
    assert (RADIX >= 2 && RADIX <= 4)
      else $error("ks_prefix_network: RADIX must be 2, 3 or 4, got %0d", RADIX);
  end
endmodule
