// simd_alu_tb: drives every ALU operation in every lane width with random
// operands and compares with integer reference arithmetic.
module simd_alu_tb;
  import simd_pkg::*;
  import simd_tb_pkg::*;

  alu_op_t     op;
  lane_mode_t  mode;
  logic [15:0] a, b, c, y;
  int checks = 0, failures = 0;

  simd_alu dut (.op, .mode, .a, .b, .c, .y);

  function automatic logic [15:0] expect_y(input alu_op_t o, input int form);
    case (o)
      ALU_ADD: return ref_lane(0, form, a, b, 0);
      ALU_SUB: return ref_lane(1, form, a, b, 0);
      ALU_MUL: return ref_lane(2, form, a, b, 0);
      ALU_MAC: return ref_lane(3, form, a, b, c);
      ALU_SHL: return ref_lane(4, form, a, 0, 0);
      ALU_SHR: return ref_lane(5, form, a, 0, 0);
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      ALU_NOT: return ~a;
      default: return b;
    endcase
  endfunction

  initial begin
    for (int form = 0; form < 3; form++) begin
      mode = (form == 0) ? MODE_H : (form == 1) ? MODE_O : MODE_Q;
      for (int o = 0; o <= int'(ALU_PASSB); o++) begin
        op = alu_op_t'(o);
        for (int i = 0; i < 300; i++) begin
          logic [15:0] exp;
          a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
          #1;
          exp = expect_y(op, form);
          checks++;
          if (y !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL op=%s form=%0d a=%h b=%h c=%h got %h exp %h", op.name(), form, a, b, c, y, exp);
          end
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
