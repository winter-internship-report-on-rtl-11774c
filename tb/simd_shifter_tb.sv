// simd_shifter_tb: checks the lane-confined one-bit left and right shifts in all
// three lane widths against lane-by-lane integer arithmetic.
module simd_shifter_tb;
  import simd_pkg::*;
  import simd_tb_pkg::*;

  logic [15:0] a, shl, shr;
  lane_mode_t  mode;
  int checks = 0, failures = 0;

  simd_shifter dut (.a, .mode, .shl, .shr);

  task automatic check(input int form);
    #1;
    checks += 2;
    if (shl !== ref_lane(4, form, a, 0, 0)) begin
      failures++; $display("FAIL shl form=%0d a=%h got %h", form, a, shl);
    end
    if (shr !== ref_lane(5, form, a, 0, 0)) begin
      failures++; $display("FAIL shr form=%0d a=%h got %h", form, a, shr);
    end
  endtask

  initial begin
    for (int form = 0; form < 3; form++) begin
      mode = (form == 0) ? MODE_H : (form == 1) ? MODE_O : MODE_Q;
      a = 16'hFFFF; check(form);
      a = 16'h8888; check(form);
      a = 16'h1111; check(form);
      for (int i = 0; i < 1000; i++) begin
        a = 16'($urandom); check(form);
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
