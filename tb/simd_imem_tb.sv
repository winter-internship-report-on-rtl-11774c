// simd_imem_tb: loads random words through the write port and reads them back,
// checking the one-cycle read latency.
module simd_imem_tb;
  logic clk = 0, we;
  logic [9:0] raddr, waddr;
  logic [17:0] rdata, wdata;
  logic [17:0] shadow [1024];
  logic [9:0] addrs [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_imem dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 10'($urandom);
      @(negedge clk); we = 1; waddr = addrs[i]; wdata = 18'($urandom); shadow[addrs[i]] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = addrs[i];
      @(posedge clk); #1;                  // data valid one edge after the address
      checks++;
      if (rdata !== shadow[addrs[i]]) begin failures++; $display("FAIL @%0d %h exp %h", addrs[i], rdata, shadow[addrs[i]]); end
    end
    // latency: change the address and check the output has not yet followed
    raddr = addrs[0]; @(posedge clk); #1;
    raddr = addrs[1]; #1; checks++;
    if (shadow[addrs[0]] != shadow[addrs[1]] && rdata !== shadow[addrs[0]]) begin failures++; $display("FAIL read is not registered"); end
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
