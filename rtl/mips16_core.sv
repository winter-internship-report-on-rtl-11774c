// mips16_core: 16-bit MIPS-style processor with a five-stage pipeline.
//
// Stages, one clock each, separated by pipeline registers:
//   IF  - the instruction at PC is read from the instruction ROM.
//   ID  - the instruction is decoded, its registers are read, the hazard unit
//         decides whether it must wait, and BZ is resolved (R[rs] == 0 moves PC
//         to the branch's address + 1 + imm).
//   EX  - the ALU computes the result or the load/store address (rs + imm).
//   MEM - LD reads and ST writes the data RAM.
//   WB  - the result or loaded word is written to the register file.
// Hazards are handled by stalling only: while an instruction in ID reads a
// register that EX, MEM or WB will still write, PC and IF/ID hold and a bubble
// enters EX. A branch has one delay slot: the instruction after it, already
// fetched when the branch resolves, always executes. Reset (synchronous, active
// high) clears PC, the registers and the pipeline. The five stages and the
// stall-only hazard handling follow the core's description; the instruction
// encoding (mips16_pkg), branch resolution in ID and the delay slot are this
// design's reconstruction. The program is loaded through imem_*; registers and
// data RAM can be read through the debug ports.
module mips16_core
  import mips16_pkg::*;
#(
  parameter int unsigned PC_WIDTH = 8
) (
  input  logic                clk,
  input  logic                rst,
  output logic [PC_WIDTH-1:0] pc,
  input  logic                imem_we,
  input  logic [PC_WIDTH-1:0] imem_waddr,
  input  logic [15:0]         imem_wdata,
  input  logic [2:0]          dbg_reg_addr,
  output logic [15:0]         dbg_reg_data,
  input  logic [7:0]          dbg_mem_addr,
  output logic [15:0]         dbg_mem_data,
  output logic                stall,
  output logic                branch_taken
);

  // ---------------- pipeline registers ----------------
  typedef struct packed {
    logic [15:0]         instr;
    logic [PC_WIDTH-1:0] pc;
  } if_id_t;

  typedef struct packed {
    alu_cmd_t    cmd;
    logic [15:0] a, b, st_data;
    logic [2:0]  dest;
    logic        wr, ld, st;
  } id_ex_t;

  typedef struct packed {
    logic [15:0] result, st_data;
    logic [2:0]  dest;
    logic        wr, ld, st;
  } ex_mem_t;

  typedef struct packed {
    logic [15:0] wdata;
    logic [2:0]  dest;
    logic        wr;
  } mem_wb_t;

  if_id_t  if_id;
  id_ex_t  id_ex, id_ex_n;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  // ---------------- IF ----------------
  logic [15:0]         if_instr;
  logic [PC_WIDTH-1:0] branch_target;

  mips16_imem #(.DEPTH(1 << PC_WIDTH)) u_imem (
    .clk, .addr(pc), .data(if_instr), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // ---------------- ID ----------------
  opcode_t     op;
  logic [2:0]  rd, rs, rt;
  logic [15:0] simm, rs_val, rt_val;
  logic        use1, use2;
  logic [2:0]  src2;

  assign op   = opcode_t'(if_id.instr[15:12]);
  assign rd   = if_id.instr[11:9];
  assign rs   = if_id.instr[8:6];
  assign rt   = if_id.instr[5:3];
  assign simm = {{10{if_id.instr[5]}}, if_id.instr[5:0]};

  // register source usage: R-type reads rs, rt; ADDI/LD read rs; ST reads rs and rd; BZ reads rs
  always_comb begin
    use1 = 1'b0;
    use2 = 1'b0;
    src2 = rt;
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SL, OP_SR, OP_SRU: begin use1 = 1'b1; use2 = 1'b1; end
      OP_ADDI, OP_LD, OP_BZ: use1 = 1'b1;
      OP_ST: begin use1 = 1'b1; use2 = 1'b1; src2 = rd; end
      default: ;
    endcase
  end

  mips16_regfile #(.NREGS(8)) u_rf (
    .clk, .rst, .ra(rs), .rb(src2), .da(rs_val), .db(rt_val),
    .we(mem_wb.wr), .wa(mem_wb.dest), .wd(mem_wb.wdata),
    .dbg_a(dbg_reg_addr), .dbg_d(dbg_reg_data)
  );

  mips16_hazard u_hz (
    .src1(rs), .use1, .src2, .use2,
    .ex_dest(id_ex.dest), .ex_wr(id_ex.wr),
    .mem_dest(ex_mem.dest), .mem_wr(ex_mem.wr),
    .wb_dest(mem_wb.dest), .wb_wr(mem_wb.wr),
    .stall
  );

  assign branch_taken  = (op == OP_BZ) && !stall && (rs_val == 16'h0);
  assign branch_target = if_id.pc + PC_WIDTH'(1) + simm[PC_WIDTH-1:0];

  always_comb begin
    id_ex_n         = '0;
    id_ex_n.a       = rs_val;
    id_ex_n.b       = rt_val;
    id_ex_n.st_data = rt_val;
    id_ex_n.dest    = rd;
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SL, OP_SR, OP_SRU: begin
        id_ex_n.cmd = alu_cmd_t'(op);
        id_ex_n.wr  = 1'b1;
      end
      OP_ADDI: begin id_ex_n.cmd = ALU_ADD; id_ex_n.b = simm; id_ex_n.wr = 1'b1; end
      OP_LD:   begin id_ex_n.cmd = ALU_ADD; id_ex_n.b = simm; id_ex_n.wr = 1'b1; id_ex_n.ld = 1'b1; end
      OP_ST:   begin id_ex_n.cmd = ALU_ADD; id_ex_n.b = simm; id_ex_n.st = 1'b1; end
      default: id_ex_n.cmd = ALU_NC;   // NOP, BZ and undefined opcodes
    endcase
    if (id_ex_n.dest == 3'd0) id_ex_n.wr = 1'b0;   // writes to register 0 are dropped
  end

  // ---------------- EX ----------------
  logic [15:0] alu_r;
  mips16_alu u_alu (.cmd(id_ex.cmd), .a(id_ex.a), .b(id_ex.b), .r(alu_r));

  // ---------------- MEM ----------------
  logic [15:0] mem_rdata;
  mips16_dmem #(.DEPTH(256)) u_dmem (
    .clk, .addr(ex_mem.result[7:0]), .we(ex_mem.st), .wdata(ex_mem.st_data), .rdata(mem_rdata),
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      if_id  <= '0;
      id_ex  <= '0;
      ex_mem <= '0;
      mem_wb <= '0;
    end else begin
      if (!stall) begin
        pc    <= branch_taken ? branch_target : pc + 1'b1;
        if_id <= '{instr: if_instr, pc: pc};
        id_ex <= id_ex_n;
      end else begin
        id_ex <= '0;   // bubble
      end
      ex_mem <= '{result: alu_r, st_data: id_ex.st_data, dest: id_ex.dest,
                  wr: id_ex.wr, ld: id_ex.ld, st: id_ex.st};
      mem_wb <= '{wdata: ex_mem.ld ? mem_rdata : ex_mem.result, dest: ex_mem.dest, wr: ex_mem.wr};
    end
  end

endmodule
