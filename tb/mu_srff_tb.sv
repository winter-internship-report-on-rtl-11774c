// mu_srff_tb: gated SR latch. Random s, r and gate levels; checks set, reset,
// hold while the gate is low or s = r = 0, and both outputs high for s = r = 1
// with the gate high.
module mu_srff_tb;
  logic clk, s, r, q, qbar;
  logic st;
  int checks = 0, failures = 0;

  mu_srff dut (.clk, .s, .r, .q, .qbar);

  initial begin
    clk = 1; s = 0; r = 1; #1;            // start from a known state
    clk = 0; r = 0; #1; st = 0;
    for (int i = 0; i < 500; i++) begin
      {clk, s, r} = 3'($urandom);
      #1;
      if (clk && s && !r) st = 1;
      if (clk && r && !s) st = 0;
      checks++;
      if (clk && s && r) begin
        if (q !== 1'b1 || qbar !== 1'b1) begin failures++; $display("FAIL s=r=1 q=%0b qbar=%0b", q, qbar); end
      end else if (q !== st || qbar !== ~st) begin
        failures++; $display("FAIL clk=%0b s=%0b r=%0b q=%0b qbar=%0b exp %0b", clk, s, r, q, qbar, st);
      end
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
