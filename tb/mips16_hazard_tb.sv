// mips16_hazard_tb: exhaustive-by-random check of the stall decision against
// a straightforward restatement of the rule (a used, non-zero source equal to a
// pending destination in EX, MEM or WB).
module mips16_hazard_tb;
  logic [2:0] src1, src2, ex_dest, mem_dest, wb_dest;
  logic use1, use2, ex_wr, mem_wr, wb_wr, stall;
  int checks = 0, failures = 0, n_stall = 0;

  mips16_hazard dut (.src1, .use1, .src2, .use2, .ex_dest, .ex_wr, .mem_dest, .mem_wr,
                     .wb_dest, .wb_wr, .stall);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic exp;
      {src1, src2, ex_dest, mem_dest, wb_dest} = 15'($urandom);
      {use1, use2, ex_wr, mem_wr, wb_wr} = 5'($urandom);
      #1;
      exp = 0;
      if (use1 && src1 != 0 && ((ex_wr && src1 == ex_dest) || (mem_wr && src1 == mem_dest) || (wb_wr && src1 == wb_dest))) exp = 1;
      if (use2 && src2 != 0 && ((ex_wr && src2 == ex_dest) || (mem_wr && src2 == mem_dest) || (wb_wr && src2 == wb_dest))) exp = 1;
      checks++;
      if (exp) n_stall++;
      if (stall !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL s1=%0d/%0b s2=%0d/%0b ex=%0d/%0b mem=%0d/%0b wb=%0d/%0b stall=%0b",
                                   src1, use1, src2, use2, ex_dest, ex_wr, mem_dest, mem_wr, wb_dest, wb_wr, stall);
      end
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
