// simd_system_tb: end-to-end run of the SIMD processor with its own memories.
// The sample program and its three data words are loaded through the host
// ports while reset is held, the program runs to halt, and every data word is
// read back through the host port and compared with the instruction-level
// model. Also checks the documented 5-cycle instruction timing.
module simd_system_tb;
  import simd_tb_pkg::*;

  logic clk = 0, rst, prog_we, host_we, done;
  logic [9:0]  prog_addr, host_addr, pc;
  logic [17:0] prog_data;
  logic [15:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_system dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .host_we, .host_addr,
                   .host_wdata, .host_rdata, .done, .pc);

  initial begin
    simd_model m;
    int cycles;
    m = new();
    for (int i = 0; i < PROG_LEN; i++) m.imem[i] = SAMPLE_PROG[i];
    for (int i = 0; i < 3; i++) m.dmem[i] = SAMPLE_DATA[i];
    m.run(100000);
    rst = 1; prog_we = 0; host_we = 0; prog_addr = 0; host_addr = 0; prog_data = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = m.imem[i];
      host_we = 1; host_addr = 10'(i); host_wdata = (i < 3) ? SAMPLE_DATA[i] : 16'h0;
    end
    @(negedge clk); prog_we = 0; host_we = 0;
    @(posedge clk); #1 rst = 0;
    cycles = 0;
    while (!done && cycles < 10000) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (!done || cycles != 1 + 5 * (m.steps - 1) + 2) begin
      failures++; $display("FAIL done=%0b after %0d cycles, %0d instructions", done, cycles, m.steps);
    end
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); host_addr = 10'(i);
      @(posedge clk); #1;
      checks++;
      if (host_rdata !== m.dmem[i]) begin failures++; $display("FAIL mem[%0d]=%h exp %h", i, host_rdata, m.dmem[i]); end
    end
    $display("sample program: %0d instructions, %0d cycles, %0d loop jumps", m.steps, cycles, m.loop_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
