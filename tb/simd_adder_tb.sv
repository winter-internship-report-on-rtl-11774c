// simd_adder_tb: random and corner-case check of the SIMD adder/subtractor in all
// three lane widths against lane-by-lane integer arithmetic.
module simd_adder_tb;
  import simd_pkg::*;
  import simd_tb_pkg::*;

  logic [15:0] a, b, sum;
  lane_mode_t  mode;
  logic        sub;
  int checks = 0, failures = 0;

  simd_adder dut (.a, .b, .mode, .sub, .sum);

  task automatic check(input int form);
    logic [15:0] exp;
    #1;
    exp = ref_lane(sub ? 1 : 0, form, a, b, 0);
    checks++;
    if (sum !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL form=%0d sub=%0b a=%h b=%h got %h exp %h", form, sub, a, b, sum, exp);
    end
  endtask

  initial begin
    for (int form = 0; form < 3; form++) begin
      mode = (form == 0) ? MODE_H : (form == 1) ? MODE_O : MODE_Q;
      // carries that cross lane boundaries
      a = 16'hFFFF; b = 16'h0001; sub = 0; check(form);
      a = 16'h0000; b = 16'h0001; sub = 1; check(form);
      a = 16'h0F0F; b = 16'h0101; sub = 0; check(form);
      for (int i = 0; i < 2000; i++) begin
        a = 16'($urandom); b = 16'($urandom); sub = 1'($urandom);
        check(form);
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
