// mips16_regfile_tb: random writes and reads of the eight registers through both
// read ports and the debug port; register 0 must stay 0.
module mips16_regfile_tb;
  logic clk = 0, rst, we;
  logic [2:0] ra, rb, wa, dbg_a;
  logic [15:0] da, db, wd, dbg_d;
  logic [15:0] shadow [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mips16_regfile dut (.clk, .rst, .ra, .rb, .da, .db, .we, .wa, .wd, .dbg_a, .dbg_d);

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra = 0; rb = 0; dbg_a = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      @(posedge clk); #1;
      if (we && wa != 0) shadow[wa] = wd;
      we = 0; ra = 3'($urandom); rb = 3'($urandom); dbg_a = 3'($urandom); #1;
      checks += 3;
      if (da !== shadow[ra]) begin failures++; $display("FAIL a R%0d=%h exp %h", ra, da, shadow[ra]); end
      if (db !== shadow[rb]) begin failures++; $display("FAIL b R%0d=%h exp %h", rb, db, shadow[rb]); end
      if (dbg_d !== shadow[dbg_a]) begin failures++; $display("FAIL dbg R%0d=%h exp %h", dbg_a, dbg_d, shadow[dbg_a]); end
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
