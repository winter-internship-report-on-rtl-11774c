// mips16_connector_tb: checks the load / run / report sequence of the
// self-loading MIPS16 block.
//
// The testbench serves the program from a table on prog_addr. Beside the
// block it runs a second mips16_core. That core gets the same program through
// its load port and leaves reset on the same clock edge as the block's core.
// Its registers, read through its debug port, are the reference for the
// reported values. The runs:
//  * The published 19-word test program. R0..R6 must also equal the published
//    0, 8, 16, 24, 40, 40, 0. R7 counts taken branches, so it depends on the
//    run length and is only compared with the reference core.
//  * Four random straight-line programs of ADD/SUB/AND/OR/XOR/ADDI. Each
//    ends in a branch-to-self with a NOP in its delay slot.
// In each run it checks:
//  * that prog_addr steps 0..18;
//  * that res_valid is high for exactly 8 cycles, starting 19 + 81 + 1 cycles
//    after reset is released;
//  * that resou counts 0..7;
//  * that each res equals the reference register.
module mips16_connector_tb;
  logic clk = 0, rst = 1, res_valid;
  logic [4:0] prog_addr;
  logic [15:0] prog_data, res;
  logic [3:0] resou;
  logic [7:0] pc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [15:0] prog [19];
  assign prog_data = (prog_addr < 5'd19) ? prog[prog_addr] : 16'h0;

  mips16_connector dut (.*);

  // Reference core.
  logic ref_rst = 1, ref_we = 0, ref_stall, ref_branch;
  logic [7:0] ref_pc, ref_waddr = 0;
  logic [15:0] ref_wdata = 0, ref_reg, ref_mem;
  logic [2:0] ref_raddr = 0;
  mips16_core u_ref (
    .clk, .rst(ref_rst), .pc(ref_pc), .imem_we(ref_we), .imem_waddr(ref_waddr), .imem_wdata(ref_wdata),
    .dbg_reg_addr(ref_raddr), .dbg_reg_data(ref_reg), .dbg_mem_addr(8'd0), .dbg_mem_data(ref_mem),
    .stall(ref_stall), .branch_taken(ref_branch)
  );

  localparam logic [15:0] PUBLISHED [8] = '{16'd0, 16'd8, 16'd16, 16'd24, 16'd40, 16'd40, 16'd0, 16'd0};

  task automatic run(input bit published);
    logic [15:0] expect_r [8];
    int n_valid, first_valid;
    // load the reference core while both are in reset
    ref_rst = 1;
    foreach (prog[i]) begin
      @(negedge clk); ref_we = 1; ref_waddr = 8'(i); ref_wdata = prog[i];
    end
    @(negedge clk); ref_we = 0;
    rst = 1;
    @(negedge clk); rst = 0;
    n_valid = 0; first_valid = -1;
    for (int cyc = 1; cyc <= 120; cyc++) begin
      // cyc-th rising edge after reset release comes next
      if (cyc <= 19) begin
        checks++;
        if (prog_addr !== 5'(cyc - 1)) begin failures++; $display("FAIL prog_addr %0d at load cycle %0d", prog_addr, cyc); end
      end
      if (cyc >= 101 && cyc <= 108) begin
        ref_raddr = 3'(cyc - 101); #1;
        expect_r[cyc - 101] = ref_reg;
      end
      @(posedge clk);
      if (cyc == 19) ref_rst = 0;    // both cores leave reset after edge 19
      #1;
      if (res_valid) begin
        n_valid++;
        if (first_valid < 0) first_valid = cyc;
        checks++;
        if (resou !== 4'(n_valid - 1) || res !== expect_r[n_valid - 1]) begin
          failures++; $display("FAIL report %0d: R%0d = %0d, reference %0d", n_valid - 1, resou, res, expect_r[n_valid - 1]);
        end
        if (published && n_valid <= 7) begin
          checks++;
          if (res !== PUBLISHED[n_valid - 1]) begin
            failures++; $display("FAIL published R%0d = %0d, expected %0d", n_valid - 1, res, PUBLISHED[n_valid - 1]);
          end
        end
        if (published && n_valid == 8) begin
          checks++;
          if (res == 0) begin failures++; $display("FAIL R7 = 0: no branch was taken"); end
          $display("published program: R7 = %0d taken branches in 81 cycles", res);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_valid != 8 || first_valid != 101) begin
      failures++; $display("FAIL %0d reports, first after edge %0d", n_valid, first_valid);
    end
  endtask

  initial begin
    // published program, rest of the 19-word image empty
    foreach (prog[i]) prog[i] = '0;
    prog[0] = {4'd9, 3'd1, 3'd0, 6'd8};          // ADDI R1 = R0 + 8
    prog[1] = {4'd9, 3'd2, 3'd1, 6'd8};          // ADDI R2 = R1 + 8
    prog[2] = {4'd9, 3'd3, 3'd2, 6'd8};          // ADDI R3 = R2 + 8
    prog[3] = {4'd1, 3'd4, 3'd2, 3'd3, 3'd0};    // ADD  R4 = R2 + R3
    prog[4] = {4'd11, 3'd4, 3'd1, 6'd2};         // ST   mem[R1 + 2] = R4
    prog[5] = {4'd10, 3'd5, 3'd1, 6'd2};         // LD   R5 = mem[R1 + 2]
    prog[6] = {4'd2, 3'd6, 3'd4, 3'd5, 3'd0};    // SUB  R6 = R4 - R5
    prog[7] = {4'd12, 3'd0, 3'd6, 6'b111000};    // BZ   R6 back to 0
    prog[8] = {4'd9, 3'd7, 3'd7, 6'd1};          // ADDI R7 = R7 + 1 (delay slot)
    run(1);
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 16; i++) begin
        int op = $urandom_range(1, 6);
        if (op == 6) prog[i] = {4'd9, 3'($urandom), 3'($urandom), 6'($urandom)};
        else         prog[i] = {4'(op), 3'($urandom), 3'($urandom), 3'($urandom), 3'd0};
      end
      prog[16] = '0;
      prog[17] = {4'd12, 3'd0, 3'd0, 6'b111111};  // BZ R0 to itself
      prog[18] = '0;
      run(0);
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
