// mips16_core_tb: runs the MIPS-style pipeline on the core's published 9-word
// test program and on random programs.
//  * Published program: R1=8, R2=16, R3=24, R4=40, R5=40, R6=0, ram[10]=40 as
//    printed for it; R7 (incremented in the branch delay slot) must equal the
//    number of taken branches once the delay slot has written back. A second
//    run reads R4 and R7 exactly 100 cycles after reset, the point at which
//    the printed values were taken; R7 must be 3 there.
//  * Random programs (ALU, ADDI, LD, ST and short forward BZ) are compared,
//    register by register and word by word, with an instruction-level model
//    that executes one instruction at a time (no pipeline), so every stall the
//    pipeline inserts must leave the architectural result unchanged.
// Stalls and taken branches are counted; both must occur.
module mips16_core_tb;
  logic clk = 0, rst, imem_we, stall, branch_taken;
  logic [7:0]  pc, imem_waddr, dbg_mem_addr;
  logic [15:0] imem_wdata, dbg_reg_data, dbg_mem_data;
  logic [2:0]  dbg_reg_addr;
  int checks = 0, failures = 0;
  int n_stall = 0, n_branch = 0;

  always #5 clk = ~clk;

  mips16_core dut (.clk, .rst, .pc, .imem_we, .imem_waddr, .imem_wdata, .dbg_reg_addr,
                   .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data, .stall, .branch_taken);

  always @(posedge clk) if (!rst) begin
    if (stall) n_stall++;
    if (branch_taken) n_branch++;
  end

  logic [15:0] prog [256];

  task automatic load_and_reset();
    rst = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    @(posedge clk); #1 rst = 0;
  endtask

  task automatic expect_reg(input int r, input logic [15:0] v, input string what);
    dbg_reg_addr = 3'(r); #1;
    checks++;
    if (dbg_reg_data !== v) begin failures++; $display("FAIL %s: R%0d=%0d exp %0d", what, r, dbg_reg_data, v); end
  endtask

  // ---------- instruction-level model ----------
  logic [15:0] mr [8];
  logic [15:0] mm [256];

  function automatic void model_exec(input logic [15:0] in);
    int op, rd, rs, rt;
    logic [15:0] a, b, imm;
    op = int'(in[15:12]); rd = int'(in[11:9]); rs = int'(in[8:6]); rt = int'(in[5:3]);
    imm = {{10{in[5]}}, in[5:0]};
    a = mr[rs]; b = mr[rt];
    case (op)
      1: mr[rd] = a + b;
      2: mr[rd] = a - b;
      3: mr[rd] = a & b;
      4: mr[rd] = a | b;
      5: mr[rd] = a ^ b;
      6: mr[rd] = (b > 15) ? 16'h0 : 16'(a << b);
      7: mr[rd] = (b > 15) ? {16{a[15]}} : 16'($signed(a) >>> b);
      8: mr[rd] = (b > 15) ? 16'h0 : (a >> b);
      9: mr[rd] = a + imm;
      10: mr[rd] = mm[8'(a + imm)];
      11: mm[8'(a + imm)] = mr[rd];
      default: ;
    endcase
    mr[0] = '0;
  endfunction

  localparam logic [15:0] SELF_LOOP = 16'b1100_000_000_111111;   // BZ R0, -1

  initial begin
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0; dbg_reg_addr = 0; dbg_mem_addr = 0;
    // ---------- published program ----------
    foreach (prog[i]) prog[i] = '0;
    prog[0] = 16'b1001_001_000_001000;   // ADDI R1 = R0 + 8
    prog[1] = 16'b1001_010_001_001000;   // ADDI R2 = R1 + 8
    prog[2] = 16'b1001_011_010_001000;   // ADDI R3 = R2 + 8
    prog[3] = 16'b0001_100_010_011_000;  // ADD  R4 = R2 + R3
    prog[4] = 16'b1011_100_001_000010;   // ST   mem[R1 + 2] = R4
    prog[5] = 16'b1010_101_001_000010;   // LD   R5 = mem[R1 + 2]
    prog[6] = 16'b0010_110_100_101_000;  // SUB  R6 = R4 - R5
    prog[7] = 16'b1100_000_110_111000;   // BZ   R6, -8 (back to 0)
    prog[8] = 16'b1001_111_111_000001;   // ADDI R7 = R7 + 1 (delay slot)
    load_and_reset();
    wait (n_branch == 3);
    repeat (4) @(posedge clk);
    expect_reg(1, 8, "published");  expect_reg(2, 16, "published");
    expect_reg(3, 24, "published"); expect_reg(4, 40, "published");
    expect_reg(5, 40, "published"); expect_reg(6, 0, "published");
    expect_reg(7, 3, "published");
    dbg_mem_addr = 8'd10; #1; checks++;
    if (dbg_mem_data !== 16'd40) begin failures++; $display("FAIL ram[10]=%0d", dbg_mem_data); end
    $display("published program: %0d stall cycles, %0d taken branches", n_stall, n_branch);
    // The original run read the registers 100 cycles after reset: R7 = 3 there too.
    load_and_reset();
    repeat (100) @(posedge clk);
    #1 expect_reg(4, 40, "after 100 cycles");
    expect_reg(7, 3, "after 100 cycles");

    // ---------- random programs ----------
    for (int p = 0; p < 30; p++) begin
      int n, pcm, steps;
      n = 80;
      foreach (prog[i]) prog[i] = '0;
      // the data RAM has no reset: clear words 0..31 first (ST R0 -> mem[i]),
      // then seed the registers
      for (int i = 0; i < 32; i++) prog[i] = {4'd11, 3'd0, 3'd0, 6'(i)};
      for (int r = 1; r < 8; r++) prog[31+r] = {4'd9, 3'(r), 3'd0, 6'($urandom)};
      for (int i = 39; i < n; i++) begin
        int op;
        op = $urandom_range(1, 12);
        if (op == 12 && (i > n - 6 || prog[i-1][15:12] == 4'd12)) op = 1;
        if (op == 10 || op == 11) prog[i] = {4'(op), 3'($urandom), 3'd0, 6'($urandom_range(0, 31))};   // base R0
        else if (op == 12)        prog[i] = {4'd12, 3'd0, 3'($urandom), 6'($urandom_range(0, 4))};
        else if (op == 6 || op == 7 || op == 8)
          prog[i] = {4'(op), 3'($urandom), 3'($urandom), 3'($urandom), 3'd0};
        else                      prog[i] = {4'(op), 12'($urandom)};
      end
      prog[n] = '0; prog[n+1] = SELF_LOOP; prog[n+2] = '0;
      // model
      foreach (mr[i]) mr[i] = '0;
      foreach (mm[i]) mm[i] = '0;
      pcm = 0; steps = 0;
      while (prog[pcm] !== SELF_LOOP && steps < 1000) begin
        logic [15:0] in;
        in = prog[pcm];
        steps++;
        if (in[15:12] == 4'd12 && mr[in[8:6]] == 16'h0) begin
          model_exec(prog[pcm + 1]);          // delay slot
          pcm = pcm + 1 + int'($signed(in[5:0]));
        end else begin
          model_exec(in);
          pcm++;
        end
      end
      load_and_reset();
      repeat (n * 5 + 40) @(posedge clk);
      for (int r = 0; r < 8; r++) expect_reg(r, mr[r], $sformatf("random%0d", p));
      for (int a = 0; a < 32; a++) begin
        dbg_mem_addr = 8'(a); #1; checks++;
        if (dbg_mem_data !== mm[a]) begin failures++; $display("FAIL random%0d mem[%0d]=%h exp %h", p, a, dbg_mem_data, mm[a]); end
      end
    end
    $display("totals: %0d stall cycles, %0d taken branches", n_stall, n_branch);
    checks += 2;
    if (n_stall == 0) begin failures++; $display("FAIL no stall seen"); end
    if (n_branch == 0) begin failures++; $display("FAIL no branch seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
