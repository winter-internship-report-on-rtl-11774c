// simd_dmem_tb: exercises the processor port (enable + write, enable + read) and
// the host port of the data memory against a shadow array.
module simd_dmem_tb;
  logic clk = 0, en, we, h_we;
  logic [9:0] addr, h_addr;
  logic [15:0] wdata, rdata, h_wdata, h_rdata;
  logic [15:0] shadow [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_dmem dut (.clk, .en, .we, .addr, .wdata, .rdata, .h_we, .h_addr, .h_wdata, .h_rdata);

  initial begin
    en = 0; we = 0; h_we = 0; addr = 0; h_addr = 0; wdata = 0; h_wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); h_we = 1; h_addr = 10'(i); h_wdata = 16'($urandom); shadow[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int n = 0; n < 600; n++) begin
      logic [15:0] prev_rd;
      @(negedge clk);
      en = 1; we = 1'($urandom); addr = 10'($urandom); wdata = 16'($urandom);
      h_addr = 10'($urandom);
      prev_rd = rdata;
      @(posedge clk); #1;
      if (we) begin
        checks++;    // a write leaves the read register alone
        if (rdata !== prev_rd) begin failures++; $display("FAIL write changed rdata"); end
        shadow[addr] = wdata;
      end else begin
        checks++;
        if (rdata !== shadow[addr]) begin failures++; $display("FAIL cpu read @%0d %h exp %h", addr, rdata, shadow[addr]); end
      end
      en = 0; addr = 10'($urandom); prev_rd = rdata;
      @(posedge clk); #1;
      checks += 2;   // no access without enable; host port reads in parallel
      if (rdata !== prev_rd) begin failures++; $display("FAIL rdata changed without enable"); end
      if (h_rdata !== shadow[h_addr]) begin failures++; $display("FAIL host read @%0d %h exp %h", h_addr, h_rdata, shadow[h_addr]); end
    end
    // a disabled access must not write
    @(negedge clk); en = 0; we = 1; addr = 10'd7; wdata = ~shadow[7]; h_addr = 10'd7;
    @(posedge clk); @(posedge clk); #1; checks++;
    if (h_rdata !== shadow[7]) begin failures++; $display("FAIL write without enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
