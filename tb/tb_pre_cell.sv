// Exhaustive test of the pre-processing cell: all four input combinations,
// generate and propagate compared with the half-adder truth table.
module tb_pre_cell;
  logic a, b, g, p;
  int checks = 0, failures = 0;

  pre_cell dut (.a(a), .b(b), .g(g), .p(p));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      // carry and sum bits of a 1-bit addition
      checks++;
      if ({g, p} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b g=%0b p=%0b", a, b, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
