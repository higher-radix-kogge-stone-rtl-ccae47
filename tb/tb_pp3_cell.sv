// Exhaustive test of the PP3 prefix cell: every combination of the 3
// group generate/propagate pairs. The reference scans the groups from the
// most significant down: the combined range generates if some group
// generates and every more significant group propagates; it propagates
// if all groups propagate.
module tb_pp3_cell;
  localparam int N = 3;
  logic [N-1:0] g_in, p_in;
  logic         g_out, p_out;
  int checks = 0, failures = 0;

  pp3_cell dut (.g_in(g_in), .p_in(p_in), .g_out(g_out), .p_out(p_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < (1 << (2*N)); v++) begin
      {g_in, p_in} = (2*N)'(v);
      #1;
      exp_g = 1'b0;
      exp_p = 1'b1;
      for (int j = N-1; j >= 0; j--) begin
        if (exp_p && g_in[j]) exp_g = 1'b1;
        exp_p = exp_p && p_in[j];
      end
      checks++;
      if (g_out !== exp_g || p_out !== exp_p) begin
        failures++;
        $display("FAIL g_in=%b p_in=%b got g=%b p=%b want g=%b p=%b",
                  g_in, p_in, g_out, p_out, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
