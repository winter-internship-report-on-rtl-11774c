// simd_decoder: instruction decoder (ID stage) of the SIMD processor.
//
// Splits an 18-bit instruction into the fields of simd_pkg::decoded_t. The opcode
// is instruction[17:12]. Opcodes 0..35 come in groups of three (16-, 8-, 4-bit
// forms) and select an ALU operation; the remaining opcodes are loop control,
// load, store, set and halt. Field layouts:
//   register-register (add, sub, mul, and, or): dst = [3:2], src = [1:0]
//   register-immediate (add/sub/mul imm, load, store, set, loop): reg = [11:10], imm = [9:0]
//   one register (shift left/right, not):        dst = [1:0]
//   multiply-accumulate:                          dst = [5:4], src1 = [3:2], src2 = [1:0]
// Opcode values and field positions are those of the processor's published
// sample program; undefined opcodes decode as a no-operation (this design's choice).
// Purely combinational.
module simd_decoder
  import simd_pkg::*;
(
  input  logic [17:0] instr,
  output decoded_t    dec
);

  logic [5:0] opc;
  logic [3:0] grp;     // ALU group for opcodes 0..35
  logic [1:0] form;    // 0 = 16-bit, 1 = 8-bit, 2 = 4-bit
  lane_mode_t mode;

  assign opc = instr[17:12];

  always_comb begin
    logic [5:0] base;
    if (opc <= 6'd35) begin
      grp  = 4'(opc / 6'd3);
      base = 6'(grp * 3);
    end else if (opc >= OP_LOAD && opc <= 6'd46) begin
      grp  = 4'd15;
      base = (opc >= OP_SET) ? OP_SET : (opc >= OP_STORE) ? OP_STORE : OP_LOAD;
    end else begin
      grp  = 4'd15;
      base = opc;
    end
    form = 2'(opc - base);
  end

  assign mode = (form == 2'd1) ? MODE_O : (form == 2'd2) ? MODE_Q : MODE_H;

  always_comb begin
    dec          = '0;
    dec.alu_op   = ALU_PASSB;
    dec.mode     = mode;
    dec.imm      = instr[9:0];
    if (opc <= 6'd35) begin
      dec.wr_reg = 1'b1;
      unique case (grp)
        4'd0, 4'd2, 4'd4, 4'd9, 4'd10: begin   // register-register
          dec.dst  = instr[3:2];
          dec.src1 = instr[1:0];
        end
        4'd1, 4'd3, 4'd5: begin                // register-immediate
          dec.dst     = instr[11:10];
          dec.use_imm = 1'b1;
        end
        4'd6: begin                            // MAC
          dec.dst  = instr[5:4];
          dec.src1 = instr[3:2];
          dec.src2 = instr[1:0];
        end
        default: dec.dst = instr[1:0];         // shifts and not
      endcase
      unique case (grp)
        4'd0, 4'd1: dec.alu_op = ALU_ADD;
        4'd2, 4'd3: dec.alu_op = ALU_SUB;
        4'd4, 4'd5: dec.alu_op = ALU_MUL;
        4'd6:       dec.alu_op = ALU_MAC;
        4'd7:       dec.alu_op = ALU_SHL;
        4'd8:       dec.alu_op = ALU_SHR;
        4'd9:       dec.alu_op = ALU_AND;
        4'd10:      dec.alu_op = ALU_OR;
        default:    dec.alu_op = ALU_NOT;
      endcase
    end else begin
      dec.dst = instr[11:10];
      dec.is_loopj = (opc == OP_LOOPJ);
      dec.is_setlp = (opc == OP_SETLP);
      dec.is_halt  = (opc == OP_HALT);
      if (opc >= OP_LOAD && opc <= 6'd40) begin
        dec.is_load = 1'b1;
        dec.wr_reg  = 1'b1;
      end
      if (opc >= OP_STORE && opc <= 6'd43) dec.is_store = 1'b1;
      if (opc >= OP_SET && opc <= 6'd46) begin
        dec.wr_reg  = 1'b1;
        dec.use_imm = 1'b1;
      end
    end
  end

endmodule
