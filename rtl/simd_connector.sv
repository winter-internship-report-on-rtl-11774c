// simd_connector: the SIMD processor packaged as a single circuit block whose
// operands and one instruction come from input pins.
//
// The block holds simd_cpu, a built-in eight-instruction program and a
// 1024 x 16 data memory. The program loads data words 0, 1 and 2 into R0, R1
// and R2, runs the instruction on inst_in, then stores R0 to word 0, R1 to
// word 3, R2 to word 4 and R0 to word 5. Every other instruction address reads
// as halt, so done rises after the eighth instruction.
//
// Data words 0, 1 and 2 are not memory here. Reads of them return the pins a,
// b and c as sampled at that clock edge, so changing a pin changes what the
// next load sees. Stores to them are kept in the memory but stay hidden behind
// the pins. The processor bus (instruction_in, instruction_addr, data_in,
// data_out, data_addr, data_R, data_W) is brought out so that a schematic can
// watch every fetch and store.
//
// Timing:
//  * The instruction word and read data are registered, one cycle after their
//    address, the same as in simd_system.
//  * A run from reset to done takes 1 + 5*8 + 2 = 43 cycles.
//  * Results can be read back at any time through res_addr/res_data, one
//    cycle after the address.
//
// What follows the original description: the pins a, b, c and inst_in, the
// bus outputs, word 3 taken from inst_in, and the other seven instructions.
// This design's own choices:
//  * inst_in is 18 bits wide, a full instruction word;
//  * unused addresses read as halt;
//  * the registered, single-edge timing;
//  * the res_* read-back port.
module simd_connector
  import simd_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] c,
  input  logic [IW-1:0] inst_in,
  output logic          done,
  output logic [IW-1:0] instruction_in,
  output logic [DW-1:0] data_in,
  output logic [DW-1:0] data_out,
  output logic [AW-1:0] instruction_addr,
  output logic [AW-1:0] data_addr,
  output logic          data_R,
  output logic          data_W,
  input  logic [AW-1:0] res_addr,
  output logic [DW-1:0] res_data
);

  localparam logic [IW-1:0] HALT_WORD = {OP_HALT, 12'd0};

  // Built-in program; address 3 is the instruction pin.
  function automatic logic [IW-1:0] program_word(input logic [AW-1:0] addr,
                                                 input logic [IW-1:0] pin);
    unique case (addr)
      10'd0:   return {OP_LOAD,  2'd0, 10'd0};  // R0 = MEM[0]  (pin a)
      10'd1:   return {OP_LOAD,  2'd1, 10'd1};  // R1 = MEM[1]  (pin b)
      10'd2:   return {OP_LOAD,  2'd2, 10'd2};  // R2 = MEM[2]  (pin c)
      10'd3:   return pin;
      10'd4:   return {OP_STORE, 2'd0, 10'd0};  // MEM[0] = R0
      10'd5:   return {OP_STORE, 2'd1, 10'd3};  // MEM[3] = R1
      10'd6:   return {OP_STORE, 2'd2, 10'd4};  // MEM[4] = R2
      10'd7:   return {OP_STORE, 2'd0, 10'd5};  // MEM[5] = R0
      default: return HALT_WORD;
    endcase
  endfunction

  simd_cpu u_cpu (
    .clk, .rst,
    .instruction_in, .data_in, .data_out,
    .instruction_addr, .data_addr, .data_R, .data_W, .done
  );

  // Instruction fetch: registered, like the instruction RAM.
  always_ff @(posedge clk) instruction_in <= program_word(instruction_addr, inst_in);

  // Data: words 0..2 come from the pins, the rest from memory.
  logic [DW-1:0] mem_rdata, pin_q;
  logic          pin_sel;

  simd_dmem #(.DEPTH(1 << AW), .WIDTH(DW)) u_dmem (
    .clk, .en(data_R), .we(data_W), .addr(data_addr), .wdata(data_out), .rdata(mem_rdata),
    .h_we(1'b0), .h_addr(res_addr), .h_wdata('0), .h_rdata(res_data)
  );

  always_ff @(posedge clk) begin
    if (data_R && !data_W) begin
      pin_sel <= data_addr < AW'(3);
      unique case (data_addr[1:0])
        2'd0:    pin_q <= a;
        2'd1:    pin_q <= b;
        default: pin_q <= c;
      endcase
    end
  end

  assign data_in = pin_sel ? pin_q : mem_rdata;

endmodule
