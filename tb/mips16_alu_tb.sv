// mips16_alu_tb: every ALU command with random operands and shift amounts
// (including amounts of 16 and more) against integer reference arithmetic.
module mips16_alu_tb;
  import mips16_pkg::*;
  alu_cmd_t cmd;
  logic [15:0] a, b, r;
  int checks = 0, failures = 0;

  mips16_alu dut (.cmd, .a, .b, .r);

  function automatic logic [15:0] ref_r();
    longint sa;
    sa = longint'($signed(a));
    case (cmd)
      ALU_ADD: return 16'(a + b);
      ALU_SUB: return 16'(a - b);
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      ALU_XOR: return a ^ b;
      ALU_SL:  return 16'(longint'(a) * (longint'(1) << ((b > 20) ? 20 : b)));
      ALU_SR:  return 16'(sa >>> ((b > 20) ? 20 : b));
      ALU_SRU: return 16'(longint'(a) >> ((b > 20) ? 20 : b));
      default: return 16'h0;
    endcase
  endfunction

  initial begin
    for (int c = 0; c <= 8; c++) begin
      cmd = alu_cmd_t'(c);
      for (int i = 0; i < 500; i++) begin
        a = 16'($urandom);
        b = (c >= 6 && i % 4 != 0) ? 16'($urandom_range(0, 20)) : 16'($urandom);
        #1; checks++;
        if (r !== ref_r()) begin
          failures++;
          if (failures < 10) $display("FAIL %s a=%h b=%h r=%h exp %h", cmd.name(), a, b, r, ref_r());
        end
      end
    end
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
