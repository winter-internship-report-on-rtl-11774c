// simd_connector_tb: runs the pin-driven SIMD block with 60 random operand
// sets and random instructions on inst_in.
//
// Each run is predicted by the instruction-level model of simd_tb_pkg. Its
// program memory is filled with the block's eight-word program, with inst_in
// at address 3, and its data words 0..2 are set to a, b and c. Each run checks:
//  * that done rises after exactly 1 + 5*8 + 2 = 43 cycles;
//  * the number of stores seen on the bus (data_R && data_W) and each store's
//    address and data;
//  * the result words 3, 4 and 5, read back through res_*;
//  * that the loads sample the pins at load time. The pins are changed to new
//    random values once the fourth instruction has finished, and the results
//    must still follow the values that were loaded.
// The random instruction on inst_in is an ALU operation of any lane width on
// R0..R2, a set, a load of word 0..2, or a store to word 6..9.
module simd_connector_tb;
  import simd_tb_pkg::*;

  logic clk = 0, rst = 1, done, data_R, data_W;
  logic [15:0] a, b, c, data_in, data_out, res_data;
  logic [17:0] inst_in, instruction_in;
  logic [9:0] instruction_addr, data_addr, res_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  simd_connector dut (.*);

  // Store monitor.
  int          n_st;
  logic [9:0]  st_addr [16];
  logic [15:0] st_data [16];
  always @(posedge clk) begin
    if (!rst && data_R && data_W && n_st < 16) begin
      st_addr[n_st] = data_addr; st_data[n_st] = data_out; n_st++;
    end
  end

  function automatic logic [17:0] random_inst();
    int kind = $urandom_range(0, 6);
    int form = $urandom_range(0, 2);
    logic [1:0] r1 = 2'($urandom_range(0, 2)), r2 = 2'($urandom_range(0, 2)), r3 = 2'($urandom_range(0, 2));
    case (kind)
      0: return {6'(3 * $urandom_range(0, 10) + form), 8'd0, r1, r2};   // two-register ALU ops, NOT etc.
      1: return {6'(3 * (2 * $urandom_range(0, 2) + 1) + form), r1, 10'($urandom)};  // immediate add/sub/mul
      2: return {6'(18 + form), 6'd0, r1, r2, r3};                        // MAC
      3: return {6'(44 + form), r1, 10'($urandom)};                       // set
      4: return {6'(38 + form), r1, 10'($urandom_range(0, 2))};           // load a pin word
      5: return {6'(41 + form), r1, 10'($urandom_range(6, 9))};           // store to a free word
      default: return {6'(21 + 3 * $urandom_range(0, 1) + form), 10'd0, r1}; // shift
    endcase
  endfunction

  initial begin
    res_addr = 0; a = 0; b = 0; c = 0; inst_in = 0;
    for (int t = 0; t < 60; t++) begin
      simd_model m;
      logic [17:0] prog [8];
      int cycles, exp_n, k;
      m = new();
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      inst_in = random_inst();
      if (t == 0) inst_in = {6'd0, 8'd0, 2'd0, 2'd1};   // add16 R0 += R1, the example of the original
      prog = '{{6'd38, 2'd0, 10'd0}, {6'd38, 2'd1, 10'd1}, {6'd38, 2'd2, 10'd2}, inst_in,
               {6'd41, 2'd0, 10'd0}, {6'd41, 2'd1, 10'd3}, {6'd41, 2'd2, 10'd4}, {6'd41, 2'd0, 10'd5}};
      foreach (m.imem[i]) m.imem[i] = 18'h3f000;
      foreach (prog[i]) m.imem[i] = prog[i];
      m.dmem[0] = a; m.dmem[1] = b; m.dmem[2] = c;
      m.run(100);
      exp_n = (inst_in[17:12] >= 41 && inst_in[17:12] <= 43) ? 5 : 4;

      @(negedge clk); rst = 1; n_st = 0;
      repeat (2) @(negedge clk);
      rst = 0;
      cycles = 0;
      while (!done && cycles < 200) begin
        @(posedge clk); #1; cycles++;
        if (cycles == 25) begin a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); end
      end
      checks++;
      if (!done || cycles != 1 + 5 * (m.steps - 1) + 2 || m.steps != 9) begin
        failures++; $display("FAIL run %0d: done=%0b after %0d cycles, %0d steps", t, done, cycles, m.steps);
      end
      checks++;
      if (n_st != exp_n) begin failures++; $display("FAIL run %0d: %0d stores, expected %0d", t, n_st, exp_n); end
      k = 0;
      for (int i = 0; i < 8 && k < n_st; i++) begin
        if (prog[i][17:12] >= 41 && prog[i][17:12] <= 43) begin
          checks++;
          if (st_addr[k] !== prog[i][9:0] || st_data[k] !== m.r[prog[i][11:10]]) begin
            failures++;
            $display("FAIL run %0d store %0d: [%0d]=%h expected [%0d]=%h", t, k, st_addr[k], st_data[k],
                     prog[i][9:0], m.r[prog[i][11:10]]);
          end
          k++;
        end
      end
      for (int w = 3; w <= 5; w++) begin
        @(negedge clk); res_addr = 10'(w);
        @(posedge clk); #1;
        checks++;
        if (res_data !== m.dmem[w]) begin
          failures++; $display("FAIL run %0d: word %0d = %h, expected %h (inst %h)", t, w, res_data, m.dmem[w], inst_in);
        end
      end
    end
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
