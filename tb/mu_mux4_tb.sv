// mu_mux4_tb: all select values with random data words.
module mu_mux4_tb;
  logic [3:0] a, b, c, d, y;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  mu_mux4 dut (.a, .b, .c, .d, .sel, .y);

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [3:0] exp;
      {a, b, c, d} = 16'($urandom); sel = 2'(i);
      #1;
      exp = (sel == 0) ? a : (sel == 1) ? b : (sel == 2) ? c : d;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL sel=%0d y=%h exp %h", sel, y, exp); end
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
