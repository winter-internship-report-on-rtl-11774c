// simd_multiplier_tb: checks the lane-wise product (low bits of each lane) in all
// three lane widths against integer multiplication, including the products that
// appear in the processor's sample program.
module simd_multiplier_tb;
  import simd_pkg::*;
  import simd_tb_pkg::*;

  logic [15:0] a, b, prod;
  lane_mode_t  mode;
  int checks = 0, failures = 0;

  simd_multiplier dut (.a, .b, .mode, .prod);

  task automatic check(input int form);
    logic [15:0] exp;
    #1;
    exp = ref_lane(2, form, a, b, 0);
    checks++;
    if (prod !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL form=%0d a=%h b=%h got %h exp %h", form, a, b, prod, exp);
    end
  endtask

  initial begin
    // sample-program products: mul16 0x5A72*0x5A5A = ..E014, mul8 0x0152*0x5A5A = 0x5AD4
    mode = MODE_H; a = 16'h5A72; b = 16'h5A5A; #1; checks++;
    if (prod !== 16'hE014) begin failures++; $display("FAIL mul16 sample %h", prod); end
    mode = MODE_O; a = 16'h0152; b = 16'h5A5A; #1; checks++;
    if (prod !== 16'h5AD4) begin failures++; $display("FAIL mul8 sample %h", prod); end
    for (int form = 0; form < 3; form++) begin
      mode = (form == 0) ? MODE_H : (form == 1) ? MODE_O : MODE_Q;
      a = 16'hFFFF; b = 16'hFFFF; check(form);
      for (int i = 0; i < 1500; i++) begin
        a = 16'($urandom); b = 16'($urandom); check(form);
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
