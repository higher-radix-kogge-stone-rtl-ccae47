// End-to-end test of the top level at its default size (two 64-bit adders,
// radix 4 and radix 3, no parameter overrides).
//
// Both adders get independent operands every step; each sum and carry out
// is compared with a 65-bit reference addition. The test also counts the
// carry behaviours the prefix networks exist for and fails if any of them
// never occurred:
//   - carry out of the top bit,
//   - no carry anywhere,
//   - a carry that travels through at least RADIX**k bits, for every level k
//     of each network (so that the longest-span cells decide the result),
//   - a carry that travels the full width (bit 0 to carry out).
module tb_hrks_top;
  localparam int W = 64;

  logic [W-1:0] a4, b4, sum4, a3, b3, sum3;
  logic         cout4, cout3;
  int checks = 0, failures = 0;

  // Event counters: index 0 = radix-4 adder, 1 = radix-3 adder.
  int n_cout [2];
  int n_nocarry [2];
  int n_fullchain [2];
  int n_span [2][6];   // carry run length >= radix**k, k = 0..levels-1

  hrks_top dut (
    .a4(a4), .b4(b4), .sum4(sum4), .cout4(cout4),
    .a3(a3), .b3(b3), .sum3(sum3), .cout3(cout3)
  );

  // Longest run of consecutive carries (carry into bit i for i = 1..W).
  function automatic int longest_carry_run(logic [W-1:0] x, logic [W-1:0] y);
    logic c;
    int   run, best;
    c = 1'b0;
    run = 0;
    best = 0;
    for (int i = 0; i < W; i++) begin
      c = (x[i] & y[i]) | ((x[i] ^ y[i]) & c);
      run = c ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic score(int idx, int radix, int levels, logic [W-1:0] x, logic [W-1:0] y,
                       logic [W-1:0] s, logic c);
    logic [W:0] e;
    int         run;
    int         span;
    e = {1'b0, x} + {1'b0, y};
    checks++;
    if ({c, s} !== e) begin
      failures++;
      $display("FAIL radix%0d %h + %h = %b_%h, want %b_%h", radix, x, y, c, s, e[W], e[W-1:0]);
    end
    run = longest_carry_run(x, y);
    if (e[W]) n_cout[idx]++;
    if (run == 0) n_nocarry[idx]++;
    if (run == W) n_fullchain[idx]++;
    span = 1;
    for (int k = 0; k < levels; k++) begin
      if (run >= span) n_span[idx][k]++;
      span = span * radix;
    end
  endtask

  task automatic step(logic [W-1:0] x4, logic [W-1:0] y4, logic [W-1:0] x3, logic [W-1:0] y3);
    a4 = x4; b4 = y4; a3 = x3; b3 = y3;
    #1;
    score(0, 4, 3, x4, y4, sum4, cout4);
    score(1, 3, 4, x3, y3, sum3, cout3);
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end else begin
      $display("exercised %0d times: %s", count, what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] r;
    step('0, '0, '0, '0);
    step('1, 64'd1, 64'd1, '1);
    for (int i = 0; i < W; i++) begin
      r = '1;
      r = r >> (W - 1 - i);
      step(r, 64'd1, ~r, r);
      step({$urandom, $urandom}, {$urandom, $urandom}, r, 64'd1);
    end
    for (int n = 0; n < 50000; n++)
      step({$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom});

    for (int idx = 0; idx < 2; idx++) begin
      string name;
      int    radix, levels, span;
      name   = idx == 0 ? "radix-4" : "radix-3";
      radix  = idx == 0 ? 4 : 3;
      levels = idx == 0 ? 3 : 4;
      require({name, " carry out"}, n_cout[idx]);
      require({name, " no carry"}, n_nocarry[idx]);
      require({name, " full-width carry chain"}, n_fullchain[idx]);
      span = 1;
      for (int k = 0; k < levels; k++) begin
        require($sformatf("%s carry run >= %0d bits (level %0d span)", name, span, k), n_span[idx][k]);
        span = span * radix;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
