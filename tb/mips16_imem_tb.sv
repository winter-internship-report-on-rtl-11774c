// mips16_imem_tb: fills the whole instruction ROM through its write port and
// reads every word back combinationally.
module mips16_imem_tb;
  logic clk = 0, we;
  logic [7:0] addr, waddr;
  logic [15:0] data, wdata;
  logic [15:0] shadow [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mips16_imem dut (.clk, .addr, .data, .we, .waddr, .wdata);

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 16'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(255 - i); #1; checks++;
      if (data !== shadow[255 - i]) begin failures++; $display("FAIL rom[%0d]=%h exp %h", 255 - i, data, shadow[255 - i]); end
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
