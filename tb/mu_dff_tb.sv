// mu_dff_tb: random data and reset, q checked after every rising edge.
module mu_dff_tb;
  logic clk = 0, reset, d, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mu_dff dut (.clk, .reset, .d, .q);

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic exp;
      @(negedge clk);
      reset = ($urandom_range(0, 7) == 0); d = 1'($urandom);
      exp = reset ? 1'b0 : d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL reset=%0b d=%0b q=%0b", reset, d, q); end
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
