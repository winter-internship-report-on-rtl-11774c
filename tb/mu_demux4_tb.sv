// mu_demux4_tb: every select value routes din to exactly one output.
module mu_demux4_tb;
  logic [3:0] din, y0, y1, y2, y3;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  mu_demux4 dut (.din, .sel, .y0, .y1, .y2, .y3);

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [15:0] exp;
      din = 4'($urandom); sel = 2'(i);
      #1;
      exp = 16'(din) << (4 * sel);
      checks++;
      if ({y3, y2, y1, y0} !== exp) begin failures++; $display("FAIL sel=%0d din=%h got %h", sel, din, {y3, y2, y1, y0}); end
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
