// Test of the Kogge-Stone adder at 64 bits in radix 4 (default) and radix 3,
// plus 16-bit radix-4 and radix-3 instances. Sum and carry out are compared
// with the simulator's own WIDTH+1-bit addition for corner cases (zero,
// all ones, carry rippling from bit 0 to the top) and random operands.
module tb_ks_adder;
  localparam int W = 64;
  localparam int WS = 16;

  logic [W-1:0]  a, b, s4, s3;
  logic          c4, c3;
  logic [WS-1:0] ss4, ss3;
  logic          cs4, cs3;
  int checks = 0, failures = 0;

  ks_adder #(.WIDTH(W), .RADIX(4)) dut4 (.a(a), .b(b), .sum(s4), .cout(c4));
  ks_adder #(.WIDTH(W), .RADIX(3)) dut3 (.a(a), .b(b), .sum(s3), .cout(c3));
  ks_adder #(.WIDTH(WS), .RADIX(4)) dut4s (.a(a[WS-1:0]), .b(b[WS-1:0]), .sum(ss4), .cout(cs4));
  ks_adder #(.WIDTH(WS), .RADIX(3)) dut3s (.a(a[WS-1:0]), .b(b[WS-1:0]), .sum(ss3), .cout(cs3));

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0]  e;
    logic [WS:0] es;
    a = x;
    b = y;
    #1;
    e  = {1'b0, x} + {1'b0, y};
    es = {1'b0, x[WS-1:0]} + {1'b0, y[WS-1:0]};
    checks++;
    if ({c4, s4} !== e) begin
      failures++;
      $display("FAIL radix4 %h + %h = %b_%h, want %b_%h", x, y, c4, s4, e[W], e[W-1:0]);
    end
    checks++;
    if ({c3, s3} !== e) begin
      failures++;
      $display("FAIL radix3 %h + %h = %b_%h, want %b_%h", x, y, c3, s3, e[W], e[W-1:0]);
    end
    checks++;
    if ({cs4, ss4} !== es || {cs3, ss3} !== es) begin
      failures++;
      $display("FAIL 16-bit %h + %h: r4 %b_%h r3 %b_%h want %b_%h",
               x[WS-1:0], y[WS-1:0], cs4, ss4, cs3, ss3, es[WS], es[WS-1:0]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 64'd1);
    apply(64'd1, '1);
    apply({1'b1, 63'd0}, {1'b1, 63'd0});
    // a run of ones from bit 0 to bit i, plus 1: carry travels i+1 bits
    for (int i = 0; i < W; i++) begin
      logic [W-1:0] run;
      run = '1;
      run = run >> (W - 1 - i);
      apply(run, 64'd1);
      apply(~run, run);
      apply(64'd1 << i, 64'd1 << i);
    end
    for (int n = 0; n < 20000; n++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
