// simd_multiplier: lane-wise 16-bit SIMD multiplier (low half of each product).
//
// A shift-and-add array built from the SIMD adder and SIMD shifter. Step k looks
// at the lowest bit of every lane of the (right-shifted) multiplier; where it is
// set, the (left-shifted) multiplicand lane is added to the accumulator. Shifting
// and adding stay inside the lanes, so each lane ends with the low 16, 8 or 4 bits
// of its own product. Sixteen steps cover the widest lane; in narrow modes the
// multiplier lanes run out of ones early and the later steps add zero.
// Purely combinational. Built from the adder and shifter as the processor's
// description says; unrolling all steps into one combinational array is this
// design's choice, so that a multiply fits in the single EX cycle.
module simd_multiplier
  import simd_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  lane_mode_t  mode,
  output logic [15:0] prod
);

  // Lowest bit position of every lane
  logic [15:0] lane_lsb;
  always_comb begin
    unique case (mode)
      MODE_H:  lane_lsb = 16'h0001;
      MODE_O:  lane_lsb = 16'h0101;
      default: lane_lsb = 16'h1111;
    endcase
  end

  logic [15:0] acc  [17];
  logic [15:0] mcd  [17];  // multiplicand, shifted left once per step
  logic [15:0] mlr  [17];  // multiplier, shifted right once per step

  assign acc[0] = '0;
  assign mcd[0] = a;
  assign mlr[0] = b;

  for (genvar k = 0; k < 16; k++) begin : g_step
    logic [15:0] sel_mask, pp, unused_l, unused_r;

    // Spread each lane's lowest multiplier bit over the whole lane: take the
    // lane-confined value (lsb_bits * all-ones) by subtracting, per lane, 0 - bit.
    simd_adder u_mask (.a('0), .b(mlr[k] & lane_lsb), .mode(mode), .sub(1'b1), .sum(sel_mask));
    assign pp = mcd[k] & sel_mask;
    simd_adder u_acc (.a(acc[k]), .b(pp), .mode(mode), .sub(1'b0), .sum(acc[k+1]));
    simd_shifter u_sl (.a(mcd[k]), .mode(mode), .shl(mcd[k+1]), .shr(unused_r));
    simd_shifter u_sr (.a(mlr[k]), .mode(mode), .shl(unused_l), .shr(mlr[k+1]));
  end

  assign prod = acc[16];

endmodule
