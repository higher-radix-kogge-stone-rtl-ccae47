// The two proposed higher-radix Kogge-Stone adders, side by side.
//
// u_ks4 is the 64-bit radix-4 Kogge-Stone adder (3 levels: 129 PP4, 21 PP3
// and 21 PP2 cells), u_ks3 the 64-bit radix-3 one (4 levels: 176 PP3 and
// 40 PP2 cells). They are independent: each has its own operands, sum and
// carry out. Both are purely combinational.
module hrks_top #(
  parameter int unsigned WIDTH = 64  // operand bits of both adders
) (
  input  logic [WIDTH-1:0] a4,     // radix-4 adder: operand A
  input  logic [WIDTH-1:0] b4,     // radix-4 adder: operand B
  output logic [WIDTH-1:0] sum4,   // radix-4 adder: A + B
  output logic             cout4,  // radix-4 adder: carry out
  input  logic [WIDTH-1:0] a3,     // radix-3 adder: operand A
  input  logic [WIDTH-1:0] b3,     // radix-3 adder: operand B
  output logic [WIDTH-1:0] sum3,   // radix-3 adder: A + B
  output logic             cout3   // radix-3 adder: carry out
);
  ks_adder #(.WIDTH(WIDTH), .RADIX(4)) u_ks4 (.a(a4), .b(b4), .sum(sum4), .cout(cout4));
  ks_adder #(.WIDTH(WIDTH), .RADIX(3)) u_ks3 (.a(a3), .b(b3), .sum(sum3), .cout(cout3));
endmodule
