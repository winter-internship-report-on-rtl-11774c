// mu_univ_shift_tb: random serial data shifted left and right, register and
// serial outputs checked against a tracked model after every edge.
module mu_univ_shift_tb;
  logic clk = 0, reset, right_sel, din, s_left, s_right;
  logic [3:0] dout, exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mu_univ_shift dut (.clk, .reset, .right_sel, .din, .dout, .s_left, .s_right);

  initial begin
    reset = 1; right_sel = 0; din = 0; exp = 0;
    @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      right_sel = (i / 20) % 2 == 1; din = 1'($urandom);
      exp = right_sel ? {din, exp[3:1]} : {exp[2:0], din};
      @(posedge clk); #1;
      checks++;
      if (dout !== exp || s_left !== exp[0] || s_right !== exp[3]) begin
        failures++; $display("FAIL right=%0b din=%0b dout=%b exp %b", right_sel, din, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
