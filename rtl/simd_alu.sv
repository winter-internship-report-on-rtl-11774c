// simd_alu: the SIMD ALU of the processor.
//
// Operates on 16-bit words split into lanes of 16, 8 or 4 bits (mode H, O, Q):
// add, subtract, multiply (low bits of each lane product), multiply-accumulate
// y = a + b*c, one-bit left/right shift of a, bitwise AND, OR and NOT of a, and
// PASSB (y = b, used by the set-immediate instruction). Purely combinational: the
// processor latches the operands one cycle and the result the next.
// The operation set follows the processor's instruction list; the op encoding
// (simd_pkg::alu_op_t) is this design's.
module simd_alu
  import simd_pkg::*;
(
  input  alu_op_t     op,
  input  lane_mode_t  mode,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [15:0] c,
  output logic [15:0] y
);

  logic [15:0] addsub, mul_x, mul_y, prod, mac, shl, shr;

  // MAC multiplies b*c, MUL multiplies a*b
  assign mul_x = (op == ALU_MAC) ? b : a;
  assign mul_y = (op == ALU_MAC) ? c : b;

  simd_adder      u_add (.a(a), .b(b), .mode(mode), .sub(op == ALU_SUB), .sum(addsub));
  simd_multiplier u_mul (.a(mul_x), .b(mul_y), .mode(mode), .prod(prod));
  simd_adder      u_mac (.a(a), .b(prod), .mode(mode), .sub(1'b0), .sum(mac));
  simd_shifter    u_sh  (.a(a), .mode(mode), .shl(shl), .shr(shr));

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = addsub;
      ALU_MUL:          y = prod;
      ALU_MAC:          y = mac;
      ALU_SHL:          y = shl;
      ALU_SHR:          y = shr;
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_NOT:          y = ~a;
      default:          y = b;     // ALU_PASSB
    endcase
  end

endmodule
