// simd_cpu_tb: runs the SIMD processor core on the published sample program and
// on random programs, with behavioural one-cycle-latency memories in the bench.
// Checks: every store of the sample program's first pass against the published
// trace values; the final data memory against the instruction-level model
// (simd_tb_pkg::simd_model); 5 cycles per instruction; that the loop jump was
// taken; and that done rises on halt.
module simd_cpu_tb;
  import simd_tb_pkg::*;

  logic clk = 0, rst;
  logic [17:0] instruction_in;
  logic [15:0] data_in, data_out;
  logic [9:0]  instruction_addr, data_addr;
  logic        data_R, data_W, done;
  logic [17:0] imem [1024];
  logic [15:0] dmem [1024];
  int checks = 0, failures = 0;
  int cycles, loop_jumps, pass_no;
  logic [9:0] last_pc;

  always #5 clk = ~clk;

  simd_cpu dut (.clk, .rst, .instruction_in, .data_in, .data_out, .instruction_addr,
                .data_addr, .data_R, .data_W, .done);

  // memories: registered read, write on the rising edge when data_R && data_W
  always @(posedge clk) begin
    instruction_in <= imem[instruction_addr];
    if (data_R && data_W) dmem[data_addr] <= data_out;
    if (data_R && !data_W) data_in <= dmem[data_addr];
  end

  // count loop jumps (PC moving backwards) and compare first-pass stores with the trace
  always @(posedge clk) if (!rst) begin
    if (instruction_addr < last_pc) begin loop_jumps++; pass_no++; end
    last_pc <= instruction_addr;
    if (data_R && data_W && pass_no == 0 && trace_on)
      for (int i = 0; i < N_TRACE; i++)
        if (TRACE_PC[i] == int'(instruction_addr)) begin
          checks++;
          if (data_out !== TRACE_VAL[i]) begin
            failures++; $display("FAIL trace store at pc %0d: %h exp %h", instruction_addr, data_out, TRACE_VAL[i]);
          end
        end
  end
  bit trace_on;

  task automatic run_and_compare(input simd_model m, input string name);
    foreach (imem[i]) imem[i] = m.imem[i];
    foreach (dmem[i]) dmem[i] = m.dmem[i];
    m.run(100000);
    rst = 1; loop_jumps = 0; pass_no = 0; last_pc = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    cycles = 0;
    while (!done && cycles < 200000) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (!done) begin failures++; $display("FAIL %s: no halt", name); end
    // IDLE + 5 cycles per instruction + IF, ID of the halt instruction
    checks++;
    if (cycles != 1 + 5 * (m.steps - 1) + 2) begin
      failures++; $display("FAIL %s: %0d cycles for %0d instructions", name, cycles, m.steps);
    end
    foreach (dmem[i]) if (dmem[i] !== m.dmem[i]) begin
      failures++; $display("FAIL %s: mem[%0d]=%h exp %h", name, i, dmem[i], m.dmem[i]);
    end
    checks++;
    checks++;
    if (loop_jumps != m.loop_taken) begin
      failures++; $display("FAIL %s: %0d loop jumps, model %0d", name, loop_jumps, m.loop_taken);
    end
  endtask

  initial begin
    simd_model m;
    rst = 1;
    // 1) the sample program
    m = new();
    for (int i = 0; i < PROG_LEN; i++) m.imem[i] = SAMPLE_PROG[i];
    for (int i = 0; i < 3; i++) m.dmem[i] = SAMPLE_DATA[i];
    trace_on = 1;
    run_and_compare(m, "sample");
    checks++;
    if (m.loop_taken == 0) begin failures++; $display("FAIL sample program never looped"); end
    trace_on = 0;
    // 2) random straight-line programs, registers dumped to memory at the end
    for (int p = 0; p < 20; p++) begin
      int n;
      m = new();
      for (int i = 0; i < 1024; i++) m.dmem[i] = 16'($urandom);
      n = 0;
      for (int i = 0; i < 4; i++) m.imem[n++] = {6'd38 + 6'($urandom_range(0, 2)), 2'(i), 10'($urandom_range(0, 999))};
      for (int i = 0; i < 60; i++) begin
        int opc;
        opc = $urandom_range(0, 46);
        if (opc == 36 || opc == 37) opc = 0;
        if (opc >= 41 && opc <= 43) m.imem[n++] = {6'(opc), 2'($urandom), 10'($urandom_range(0, 999))};
        else                        m.imem[n++] = {6'(opc), 12'($urandom)};
      end
      for (int i = 0; i < 4; i++) m.imem[n++] = {6'd41, 2'(i), 10'(1000 + i)};
      m.imem[n++] = {6'd63, 12'd0};
      run_and_compare(m, $sformatf("random%0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
