// simd_cpu: the SIMD processor core (non-pipelined).
//
// One instruction at a time walks through five states, one clock each:
//   IF  - the PC is on instruction_addr; the instruction memory samples it.
//   ID  - instruction_in is decoded; the operand registers are loaded from the
//         register file (or the lane-replicated immediate).
//   EX  - the SIMD ALU computes from the operand registers; loop control acts.
//   MEM - load/store: data_R enables the data memory, data_W marks a store,
//         data_addr is the instruction's 10-bit immediate.
//   WB  - the ALU result or the loaded word is written to the register file and
//         the PC advances.
// So an ALU operation spends one cycle loading its operands and one computing,
// and every instruction takes 5 cycles. After reset the core spends one cycle in
// IDLE; a halt instruction (opcode 63) is recognised in ID and parks the core in
// HALT with done = 1 until reset. setloop loads a loop counter; loopjump
// decrements it and jumps to its immediate address while the decremented count
// is non-zero, so a loop body closed by loopjump runs setloop times.
// Memories are external: instruction_in and data_in are expected one cycle after
// the address (synchronous RAMs). Reset is synchronous and active high.
// The five stages, the state numbering (IDLE 0, IF 1, ID 2, EX 3, MEM 4, WB 5,
// HALT 6), the port list and the two-cycle ALU follow the processor's description;
// the loop-counter semantics are this design's reading of it.
module simd_cpu
  import simd_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [IW-1:0] instruction_in,
  input  logic [DW-1:0] data_in,
  output logic [DW-1:0] data_out,
  output logic [AW-1:0] instruction_addr,
  output logic [AW-1:0] data_addr,
  output logic          data_R,
  output logic          data_W,
  output logic          done
);

  typedef enum logic [2:0] {
    S_IDLE = 3'd0, S_IF = 3'd1, S_ID = 3'd2, S_EX = 3'd3,
    S_MEM  = 3'd4, S_WB = 3'd5, S_HALT = 3'd6
  } state_t;

  state_t         state;
  logic [AW-1:0]  pc, next_pc;
  logic [AW-1:0]  loop_cnt;
  decoded_t       dec, dq;
  logic [DW-1:0]  opa, opb, opc, alu_y, result;
  logic [DW-1:0]  rf_a, rf_b, rf_c;
  logic           rf_we;
  logic [DW-1:0]  rf_wd;

  simd_decoder u_dec (.instr(instruction_in), .dec(dec));

  simd_regfile #(.NREGS(4), .W(DW)) u_rf (
    .clk, .rst,
    .ra(dec.dst), .rb(dec.src1), .rc(dec.src2),
    .da(rf_a), .db(rf_b), .dc(rf_c),
    .we(rf_we), .wa(dq.dst), .wd(rf_wd)
  );

  simd_alu u_alu (.op(dq.alu_op), .mode(dq.mode), .a(opa), .b(opb), .c(opc), .y(alu_y));

  assign rf_we = (state == S_WB) && dq.wr_reg;
  assign rf_wd = dq.is_load ? data_in : result;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      pc       <= '0;
      next_pc  <= '0;
      loop_cnt <= '0;
      dq       <= '0;
      opa      <= '0;
      opb      <= '0;
      opc      <= '0;
      result   <= '0;
    end else begin
      unique case (state)
        S_IDLE: state <= S_IF;
        S_IF:   state <= S_ID;
        S_ID: begin
          dq  <= dec;
          opa <= rf_a;
          opb <= dec.use_imm ? lane_imm(dec.imm, dec.mode) : rf_b;
          opc <= rf_c;
          state <= dec.is_halt ? S_HALT : S_EX;
        end
        S_EX: begin
          result  <= alu_y;
          next_pc <= pc + 1'b1;
          if (dq.is_setlp) loop_cnt <= dq.imm;
          if (dq.is_loopj && loop_cnt != '0) begin
            loop_cnt <= loop_cnt - 1'b1;
            if (loop_cnt != AW'(1)) next_pc <= dq.imm;
          end
          state <= S_MEM;
        end
        S_MEM: state <= S_WB;
        S_WB: begin
          pc    <= next_pc;
          state <= S_IF;
        end
        default: state <= S_HALT;   // S_HALT
      endcase
    end
  end

  assign instruction_addr = pc;
  assign data_addr        = dq.imm;
  assign data_out         = opa;
  // gated by rst so that no access escapes while the state is being reset
  assign data_R           = !rst && (state == S_MEM) && (dq.is_load || dq.is_store);
  assign data_W           = !rst && (state == S_MEM) && dq.is_store;
  assign done             = (state == S_HALT);

endmodule
