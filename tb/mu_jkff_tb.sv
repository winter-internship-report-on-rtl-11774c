// mu_jkff_tb: random j/k sequences; hold, reset, set and toggle checked against
// a tracked expected state, and qb == ~q.
module mu_jkff_tb;
  logic clk = 0, rst, j, k, q, qb;
  logic exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mu_jkff dut (.clk, .rst, .j, .k, .q, .qb);

  initial begin
    rst = 1; j = 0; k = 0; exp = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      {j, k} = 2'($urandom);
      case ({j, k}) 2'b01: exp = 0; 2'b10: exp = 1; 2'b11: exp = ~exp; default: ; endcase
      @(posedge clk); #1;
      checks++;
      if (q !== exp || qb !== ~exp) begin failures++; $display("FAIL jk=%b%b q=%0b qb=%0b exp %0b", j, k, q, qb, exp); end
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
