// mu_updown_tb: counts up and down through both wrap points and checks reset.
module mu_updown_tb;
  logic clk = 0, reset, up_high;
  logic [3:0] count;
  int exp;
  int checks = 0, failures = 0, wraps = 0;

  always #5 clk = ~clk;

  mu_updown dut (.clk, .reset, .up_high, .count);

  initial begin
    reset = 1; up_high = 1; exp = 0;
    @(posedge clk); #1 reset = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      up_high = ((i / 37) % 2 == 0);
      if (up_high) begin if (exp == 15) wraps++; exp = (exp + 1) % 16; end
      else         begin if (exp == 0) wraps++;  exp = (exp + 15) % 16; end
      @(posedge clk); #1;
      checks++;
      if (count !== 4'(exp)) begin failures++; $display("FAIL up=%0b count=%0d exp %0d", up_high, count, exp); end
    end
    @(negedge clk); reset = 1; @(posedge clk); #1; checks++;
    if (count !== 0) begin failures++; $display("FAIL reset"); end
    checks++;
    if (wraps < 2) failures++;
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
