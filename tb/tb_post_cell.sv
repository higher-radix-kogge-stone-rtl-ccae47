// Exhaustive test of the post-processing cell: s must be p XOR carry-in.
module tb_post_cell;
  logic p, c_in, s;
  int checks = 0, failures = 0;

  post_cell dut (.p(p), .c_in(c_in), .s(s));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {p, c_in} = 2'(v);
      #1;
      checks++;
      if (s != ((int'(p) + int'(c_in)) % 2 == 1)) begin
        failures++;
        $display("FAIL p=%0b c_in=%0b s=%0b", p, c_in, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
