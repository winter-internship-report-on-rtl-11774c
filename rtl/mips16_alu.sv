// mips16_alu: 16-bit ALU of the MIPS-style pipeline (EX stage).
//
// Commands: NC (no change, result 0), ADD, SUB, AND, OR, XOR, SL (shift left),
// SR (arithmetic shift right, sign fill) and SRU (logical shift right, zero fill),
// with the shift amount taken from the whole of b: 16 or more shifts everything
// out. The command list and functions follow the core's ALU; the command encoding
// is this design's. Purely combinational.
module mips16_alu
  import mips16_pkg::*;
(
  input  alu_cmd_t    cmd,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] r
);

  logic big;   // shift amount of 16 or more
  assign big = |b[15:4];

  always_comb begin
    unique case (cmd)
      ALU_ADD: r = a + b;
      ALU_SUB: r = a - b;
      ALU_AND: r = a & b;
      ALU_OR:  r = a | b;
      ALU_XOR: r = a ^ b;
      ALU_SL:  r = big ? 16'h0 : (a << b[3:0]);
      ALU_SR:  r = big ? {16{a[15]}} : 16'($signed(a) >>> b[3:0]);
      ALU_SRU: r = big ? 16'h0 : (a >> b[3:0]);
      default: r = 16'h0;   // ALU_NC
    endcase
  end

endmodule
