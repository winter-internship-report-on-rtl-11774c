// simd_pkg: types and constants shared by the SIMD processor.
//
// The processor works on 16-bit words that an instruction treats either as one
// 16-bit lane (H), two 8-bit lanes (O) or four 4-bit lanes (Q). Instructions are
// 18 bits wide with a 6-bit opcode in bits [17:12]. The opcode numbering below is
// the one used by the processor's published sample program; the enum encodings of
// lane_mode_t and alu_op_t are internal choices of this design.
package simd_pkg;

  localparam int unsigned DW  = 16;  // data word
  localparam int unsigned IW  = 18;  // instruction word
  localparam int unsigned AW  = 10;  // instruction and data address
  localparam int unsigned RIW = 2;   // register index

  typedef enum logic [1:0] {
    MODE_H = 2'd0,  // one 16-bit lane
    MODE_O = 2'd1,  // two 8-bit lanes
    MODE_Q = 2'd2   // four 4-bit lanes
  } lane_mode_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MUL, ALU_MAC, ALU_SHL, ALU_SHR,
    ALU_AND, ALU_OR, ALU_NOT, ALU_PASSB
  } alu_op_t;

  // Opcode groups: a group of three opcodes covers the 16-, 8- and 4-bit forms.
  localparam logic [5:0] OP_ADD   = 6'd0;   // 0..2   add reg
  localparam logic [5:0] OP_ADDI  = 6'd3;   // 3..5   add imm
  localparam logic [5:0] OP_SUB   = 6'd6;   // 6..8   sub reg
  localparam logic [5:0] OP_SUBI  = 6'd9;   // 9..11  sub imm
  localparam logic [5:0] OP_MUL   = 6'd12;  // 12..14 mul reg
  localparam logic [5:0] OP_MULI  = 6'd15;  // 15..17 mul imm
  localparam logic [5:0] OP_MAC   = 6'd18;  // 18..20 d = d + s1*s2
  localparam logic [5:0] OP_SHL   = 6'd21;  // 21..23 shift left by one
  localparam logic [5:0] OP_SHR   = 6'd24;  // 24..26 shift right by one
  localparam logic [5:0] OP_AND   = 6'd27;  // 27..29
  localparam logic [5:0] OP_OR    = 6'd30;  // 30..32
  localparam logic [5:0] OP_NOT   = 6'd33;  // 33..35
  localparam logic [5:0] OP_LOOPJ = 6'd36;  // loopjump im
  localparam logic [5:0] OP_SETLP = 6'd37;  // setloop im
  localparam logic [5:0] OP_LOAD  = 6'd38;  // 38..40 load MEM[im] into reg
  localparam logic [5:0] OP_STORE = 6'd41;  // 41..43 store reg into MEM[im]
  localparam logic [5:0] OP_SET   = 6'd44;  // 44..46 set reg to im
  localparam logic [5:0] OP_HALT  = 6'd63;

  typedef struct packed {
    alu_op_t          alu_op;
    lane_mode_t       mode;
    logic [RIW-1:0]   dst;      // destination, also first ALU operand
    logic [RIW-1:0]   src1;     // second operand register
    logic [RIW-1:0]   src2;     // third operand register (MAC)
    logic             use_imm;  // second operand is the lane-replicated immediate
    logic [9:0]       imm;
    logic             wr_reg;   // result is written to dst
    logic             is_load;
    logic             is_store;
    logic             is_loopj;
    logic             is_setlp;
    logic             is_halt;
  } decoded_t;

  // Replicate the low lane bits of a 10-bit immediate into every lane
  // (16-bit lane: the immediate zero-extended).
  function automatic logic [DW-1:0] lane_imm(input logic [9:0] imm, input lane_mode_t mode);
    unique case (mode)
      MODE_O:  return {2{imm[7:0]}};
      MODE_Q:  return {4{imm[3:0]}};
      default: return {6'd0, imm};
    endcase
  endfunction

endpackage
