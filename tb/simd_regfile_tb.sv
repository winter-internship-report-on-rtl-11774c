// simd_regfile_tb: writes random values into the SIMD register file, reads them
// back on all three ports and checks the reset clears every register.
module simd_regfile_tb;
  logic clk = 0, rst, we;
  logic [1:0] ra, rb, rc, wa;
  logic [15:0] da, db, dc, wd;
  logic [15:0] shadow [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_regfile dut (.clk, .rst, .ra, .rb, .rc, .da, .db, .dc, .we, .wa, .wd);

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra = 0; rb = 1; rc = 2;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) begin
      ra = 2'(i); #1; checks++;
      if (da !== 16'h0) begin failures++; $display("FAIL reset r%0d=%h", i, da); end
      shadow[i] = '0;
    end
    for (int n = 0; n < 500; n++) begin
      we = 1'($urandom); wa = 2'($urandom); wd = 16'($urandom);
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
      we = 0;
      ra = 2'($urandom); rb = 2'($urandom); rc = 2'($urandom); #1;
      checks += 3;
      if (da !== shadow[ra]) begin failures++; $display("FAIL a r%0d %h exp %h", ra, da, shadow[ra]); end
      if (db !== shadow[rb]) begin failures++; $display("FAIL b r%0d %h exp %h", rb, db, shadow[rb]); end
      if (dc !== shadow[rc]) begin failures++; $display("FAIL c r%0d %h exp %h", rc, dc, shadow[rc]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
