// simd_decoder_tb: decodes every instruction of the processor's sample program and
// a few hand-built words and compares each field with an expectation worked out
// from the instruction format table (opcode groups and field positions).
module simd_decoder_tb;
  import simd_pkg::*;
  import simd_tb_pkg::*;

  logic [17:0] instr;
  decoded_t    dec;
  int checks = 0, failures = 0;

  simd_decoder dut (.instr, .dec);

  task automatic expect_fields(input string what, input alu_op_t op, input lane_mode_t m,
                               input logic [1:0] dst, input logic [1:0] s1, input logic [1:0] s2,
                               input logic use_imm, input logic wr, input logic ld, input logic st,
                               input logic lj, input logic sl, input logic ht);
    #1;
    checks++;
    if (dec.dst !== dst || dec.wr_reg !== wr || dec.is_load !== ld || dec.is_store !== st ||
        dec.is_loopj !== lj || dec.is_setlp !== sl || dec.is_halt !== ht ||
        (wr && !ld && (dec.alu_op !== op || dec.mode !== m || dec.use_imm !== use_imm)) ||
        (wr && !ld && !use_imm && (dec.src1 !== s1)) || (op == ALU_MAC && dec.src2 !== s2) ||
        dec.imm !== instr[9:0]) begin
      failures++;
      $display("FAIL %s instr=%b dec=%p", what, instr, dec);
    end
  endtask

  initial begin
    // add H1 to H0
    instr = 18'b000000_00000000_00_01; expect_fields("add16", ALU_ADD, MODE_H, 0, 1, 0, 0, 1, 0, 0, 0, 0, 0);
    // add8 Q2 <- Q2 + im
    instr = 18'b000100_10_0000001110;  expect_fields("addi8", ALU_ADD, MODE_O, 2, 0, 0, 1, 1, 0, 0, 0, 0, 0);
    // sub4 imm into Q0
    instr = 18'b001011_00_0000001000;  expect_fields("subi4", ALU_SUB, MODE_Q, 0, 0, 0, 1, 1, 0, 0, 0, 0, 0);
    // mul H2 with H1
    instr = 18'b001100_00000000_10_01; expect_fields("mul16", ALU_MUL, MODE_H, 2, 1, 0, 0, 1, 0, 0, 0, 0, 0);
    // MAC8 O0 = O0 + O1*O2
    instr = 18'b010011_000000_00_01_10; expect_fields("mac8", ALU_MAC, MODE_O, 0, 1, 2, 0, 1, 0, 0, 0, 0, 0);
    // shift left Q2
    instr = 18'b010111_0000000000_10;  expect_fields("shl4", ALU_SHL, MODE_Q, 2, 0, 0, 0, 1, 0, 0, 0, 0, 0);
    // shift right H1
    instr = 18'b011000_0000000000_01;  expect_fields("shr16", ALU_SHR, MODE_H, 1, 0, 0, 0, 1, 0, 0, 0, 0, 0);
    // O1 and O0
    instr = 18'b011100_00000000_01_00; expect_fields("and8", ALU_AND, MODE_O, 1, 0, 0, 0, 1, 0, 0, 0, 0, 0);
    // Q2 or Q1
    instr = 18'b100000_00000000_10_01; expect_fields("or4", ALU_OR, MODE_Q, 2, 1, 0, 0, 1, 0, 0, 0, 0, 0);
    // not H2
    instr = 18'b100001_0000000000_10;  expect_fields("not16", ALU_NOT, MODE_H, 2, 0, 0, 0, 1, 0, 0, 0, 0, 0);
    instr = 18'b100100_00_0000010000;  expect_fields("loopj", ALU_PASSB, MODE_H, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0);
    instr = 18'b100101_00_0000000010;  expect_fields("setlp", ALU_PASSB, MODE_H, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    instr = 18'b100111_01_0000000010;  expect_fields("load8", ALU_PASSB, MODE_O, 1, 0, 0, 0, 1, 1, 0, 0, 0, 0);
    instr = 18'b101011_10_0000000110;  expect_fields("store4", ALU_PASSB, MODE_Q, 2, 0, 0, 0, 0, 0, 1, 0, 0, 0);
    instr = 18'b101101_01_0001011010;  expect_fields("set8", ALU_PASSB, MODE_O, 1, 0, 0, 1, 1, 0, 0, 0, 0, 0);
    instr = 18'b111111_000000000000;   expect_fields("halt", ALU_PASSB, MODE_H, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1);
    // every opcode of the ALU groups: group = opcode / 3, width = opcode % 3
    for (int opc = 0; opc < 36; opc++) begin
      instr = {6'(opc), 12'($urandom)};
      #1; checks++;
      if (dec.mode !== ((opc % 3 == 0) ? MODE_H : (opc % 3 == 1) ? MODE_O : MODE_Q) || !dec.wr_reg ||
          dec.use_imm !== ((opc / 3) inside {1, 3, 5})) begin
        failures++; $display("FAIL opcode %0d dec=%p", opc, dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
