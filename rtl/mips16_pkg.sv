// mips16_pkg: instruction set constants of the 16-bit MIPS-style pipeline.
//
// Instruction formats (16 bits):
//   R-type  [15:12] opcode  [11:9] rd  [8:6] rs  [5:3] rt  [2:0] unused
//   I-type  [15:12] opcode  [11:9] rd  [8:6] rs  [5:0] signed immediate
// ADD, SUB, ADDI, LD and ST carry the opcodes used by the core's published test
// program; the other opcodes follow the order of its ALU command list; BZ is
// this design's reconstruction (branch to own address + 1 + imm when R[rs] == 0).
package mips16_pkg;

  localparam int unsigned DW = 16;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,   // rd = rs + rt
    OP_SUB  = 4'd2,   // rd = rs - rt
    OP_AND  = 4'd3,
    OP_OR   = 4'd4,
    OP_XOR  = 4'd5,
    OP_SL   = 4'd6,   // rd = rs << rt
    OP_SR   = 4'd7,   // rd = rs >>> rt (sign fill)
    OP_SRU  = 4'd8,   // rd = rs >> rt  (zero fill)
    OP_ADDI = 4'd9,   // rd = rs + imm
    OP_LD   = 4'd10,  // rd = mem[rs + imm]
    OP_ST   = 4'd11,  // mem[rs + imm] = rd
    OP_BZ   = 4'd12   // if (rs == 0) pc = pc_of_branch + 1 + imm
  } opcode_t;

  // ALU commands, in the order of the ALU's command list
  typedef enum logic [3:0] {
    ALU_NC  = 4'd0,
    ALU_ADD = 4'd1,
    ALU_SUB = 4'd2,
    ALU_AND = 4'd3,
    ALU_OR  = 4'd4,
    ALU_XOR = 4'd5,
    ALU_SL  = 4'd6,
    ALU_SR  = 4'd7,
    ALU_SRU = 4'd8
  } alu_cmd_t;

endpackage
