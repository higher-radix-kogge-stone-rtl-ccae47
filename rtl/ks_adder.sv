// Higher-radix Kogge-Stone parallel prefix adder.
//
// sum = a + b, with the carry out of the top bit on cout. Three stages:
//   1. pre-processing: one half adder per bit gives (g_i, p_i);
//   2. the radix-RADIX Kogge-Stone prefix network gives G_{i:0}, the carry
//      out of every bit, in ceil(log_RADIX WIDTH) cell levels;
//   3. post-processing: one XOR per bit, s_i = p_i ^ G_{i-1:0} (s_0 = p_0).
// The adder has no carry input; cout is G_{WIDTH-1:0}.
//
// Default: the 64-bit radix-4 adder (3 levels of PP4/PP3/PP2 cells).
// Purely combinational, no clock or reset.
module ks_adder #(
  parameter int unsigned WIDTH = 64,  // operand bits
  parameter int unsigned RADIX = 4    // 2, 3 or 4
) (
  input  logic [WIDTH-1:0] a,     // operand A
  input  logic [WIDTH-1:0] b,     // operand B
  output logic [WIDTH-1:0] sum,   // A + B, low WIDTH bits
  output logic             cout   // carry out of bit WIDTH-1
);
  logic [WIDTH-1:0] g, p;          // bit generate / propagate
  logic [WIDTH-1:0] g_pfx, p_pfx;  // G_{i:0}, P_{i:0}
  logic [WIDTH:0]   carry;         // carry[i] = carry into bit i

  for (genvar i = 0; i < WIDTH; i++) begin : g_pre
    pre_cell u_pre (.a(a[i]), .b(b[i]), .g(g[i]), .p(p[i]));
  end

  ks_prefix_network #(.WIDTH(WIDTH), .RADIX(RADIX)) u_net (
    .g    (g),
    .p    (p),
    .g_pfx(g_pfx),
    .p_pfx(p_pfx)
  );

  // The group propagate P_{i:0} is not needed for the sum.
  logic unused_p_pfx;
  assign unused_p_pfx = ^p_pfx;

  assign carry = {g_pfx, 1'b0};

  for (genvar i = 0; i < WIDTH; i++) begin : g_post
    post_cell u_post (.p(p[i]), .c_in(carry[i]), .s(sum[i]));
  end

  assign cout = carry[WIDTH];
endmodule
