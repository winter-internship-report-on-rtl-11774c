// mips16_dmem_tb: random stores and loads on the data RAM, checked on both the
// access port and the debug port against a shadow array.
module mips16_dmem_tb;
  logic clk = 0, we;
  logic [7:0] addr, dbg_addr;
  logic [15:0] wdata, rdata, dbg_data;
  logic [15:0] shadow [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mips16_dmem dut (.clk, .addr, .we, .wdata, .rdata, .dbg_addr, .dbg_data);

  initial begin
    we = 0; addr = 0; wdata = 0; dbg_addr = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr = 8'(i); wdata = 16'(i * 7 + 3); shadow[i] = wdata;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 8'($urandom); wdata = 16'($urandom); dbg_addr = 8'($urandom);
      #1;
      checks += 2;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL read @%0d %h exp %h", addr, rdata, shadow[addr]); end
      if (dbg_data !== shadow[dbg_addr]) begin failures++; $display("FAIL dbg @%0d %h exp %h", dbg_addr, dbg_data, shadow[dbg_addr]); end
      @(posedge clk); #1;
      if (we) shadow[addr] = wdata;
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
