// dec74138_tb: all 64 combinations of select and enable inputs.
module dec74138_tb;
  logic a, b, c, e1_n, e2_n, e3;
  logic [7:0] y_n;
  int checks = 0, failures = 0;

  dec74138 dut (.a, .b, .c, .e1_n, .e2_n, .e3, .y_n);

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [7:0] exp;
      {e1_n, e2_n, e3, a, b, c} = 6'(i);
      #1;
      exp = 8'hFF;
      if (!e1_n && !e2_n && e3) exp[4 * a + 2 * b + c] = 1'b0;
      checks++;
      if (y_n !== exp) begin failures++; $display("FAIL in=%b y_n=%b exp %b", 6'(i), y_n, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
