// Test of the higher-radix Kogge-Stone prefix network.
//
// Three instances at 64 bits: radix 4 (default), radix 3 and radix 2. Each
// is driven with random and hand-picked generate/propagate vectors and every
// output bit is compared with a bit-serial prefix scan,
//   G_{i:0} = g_i | p_i & G_{i-1:0},  P_{i:0} = p_i & P_{i-1:0}.
// A 16-bit radix-4 and radix-3 instance (the sizes drawn as examples) are
// checked the same way. The depth and cell counts the network generates
// are compared with the published 64-bit figures: KS4 3 levels, 129 PP4,
// 21 PP3, 21 PP2; KS3 4 levels, 176 PP3, 40 PP2; KS2 6 levels, 321 PP2;
// largest fan-out equal to the radix (4, 3, 2).
module tb_ks_prefix_network;
  import hrks_pkg::*;

  localparam int W = 64;
  localparam int WS = 16;

  logic [W-1:0]  g, p;
  logic [W-1:0]  g4, p4, g3, p3, g2, p2;
  logic [WS-1:0] gs4, ps4, gs3, ps3;
  int checks = 0, failures = 0;

  ks_prefix_network #(.WIDTH(W), .RADIX(4)) dut4 (.g(g), .p(p), .g_pfx(g4), .p_pfx(p4));
  ks_prefix_network #(.WIDTH(W), .RADIX(3)) dut3 (.g(g), .p(p), .g_pfx(g3), .p_pfx(p3));
  ks_prefix_network #(.WIDTH(W), .RADIX(2)) dut2 (.g(g), .p(p), .g_pfx(g2), .p_pfx(p2));
  ks_prefix_network #(.WIDTH(WS), .RADIX(4)) dut4s (.g(g[WS-1:0]), .p(p[WS-1:0]), .g_pfx(gs4), .p_pfx(ps4));
  ks_prefix_network #(.WIDTH(WS), .RADIX(3)) dut3s (.g(g[WS-1:0]), .p(p[WS-1:0]), .g_pfx(gs3), .p_pfx(ps3));

  task automatic check_int(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic check_vec();
    logic [W-1:0] eg, ep;
    logic         cg, cp;
    cg = 1'b0;
    cp = 1'b1;
    for (int i = 0; i < W; i++) begin
      cg = g[i] | (p[i] & cg);
      cp = p[i] & cp;
      eg[i] = cg;
      ep[i] = cp;
    end
    checks++;
    if (g4 !== eg || p4 !== ep) begin
      failures++;
      $display("FAIL radix4 g=%h p=%h G=%h/%h P=%h/%h", g, p, g4, eg, p4, ep);
    end
    checks++;
    if (g3 !== eg || p3 !== ep) begin
      failures++;
      $display("FAIL radix3 g=%h p=%h G=%h/%h P=%h/%h", g, p, g3, eg, p3, ep);
    end
    checks++;
    if (g2 !== eg || p2 !== ep) begin
      failures++;
      $display("FAIL radix2 g=%h p=%h G=%h/%h P=%h/%h", g, p, g2, eg, p2, ep);
    end
    checks++;
    if (gs4 !== eg[WS-1:0] || ps4 !== ep[WS-1:0] || gs3 !== eg[WS-1:0] || ps3 !== ep[WS-1:0]) begin
      failures++;
      $display("FAIL 16-bit g=%h p=%h", g[WS-1:0], p[WS-1:0]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Structure of the 64-bit networks against the published table.
    check_int("KS4-64 depth", int'(num_levels(4, 64)), 3);
    check_int("KS4-64 PP4",   int'(cell_count(4, 64, 4)), 129);
    check_int("KS4-64 PP3",   int'(cell_count(4, 64, 3)), 21);
    check_int("KS4-64 PP2",   int'(cell_count(4, 64, 2)), 21);
    check_int("KS3-64 depth", int'(num_levels(3, 64)), 4);
    check_int("KS3-64 PP3",   int'(cell_count(3, 64, 3)), 176);
    check_int("KS3-64 PP2",   int'(cell_count(3, 64, 2)), 40);
    check_int("KS2-64 depth", int'(num_levels(2, 64)), 6);
    check_int("KS2-64 PP2",   int'(cell_count(2, 64, 2)), 321);
    check_int("KS4-64 fan-out", int'(max_fanout(4, 64)), 4);
    check_int("KS3-64 fan-out", int'(max_fanout(3, 64)), 3);
    check_int("KS2-64 fan-out", int'(max_fanout(2, 64)), 2);
    check_int("KS4-16 depth", int'(num_levels(4, 16)), 2);
    check_int("KS3-16 depth", int'(num_levels(3, 16)), 3);

    // Hand-picked vectors: all-propagate with a single generate at each bit,
    // so the carry has to travel through every level.
    for (int i = 0; i < W; i++) begin
      g = '0;
      g[i] = 1'b1;
      p = '1;
      #1;
      check_vec();
      // same, with the propagate chain cut one bit above
      if (i + 1 < W) p[i+1] = 1'b0;
      #1;
      check_vec();
    end
    // Single propagate hole in an all-generate-at-bit-0 chain.
    for (int i = 1; i < W; i++) begin
      g = 64'd1;
      p = '1;
      p[i] = 1'b0;
      #1;
      check_vec();
    end
    // Random vectors, with a bias towards long propagate runs.
    for (int n = 0; n < 20000; n++) begin
      g = {$urandom, $urandom};
      p = {$urandom, $urandom};
      if (n % 2 == 1) begin
        p = p | {$urandom, $urandom} | {$urandom, $urandom};
        g = g & {$urandom, $urandom} & {$urandom, $urandom};
      end
      #1;
      check_vec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
