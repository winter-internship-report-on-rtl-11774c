// simd_shifter: one-bit left and right shifts confined to SIMD lanes.
//
// Two 16-bit shifters work side by side. Each 4-bit block takes, at its edge,
// either the neighbouring block's bit (when both blocks are in the same lane) or
// 0 (when the block starts a new lane). The lane width comes from the H/O/Q mode.
// Right shifts are logical. Purely combinational.
module simd_shifter
  import simd_pkg::*;
(
  input  logic [15:0] a,
  input  lane_mode_t  mode,
  output logic [15:0] shl,
  output logic [15:0] shr
);

  // link[i] = 1 when nibble i and nibble i+1 are in the same lane
  logic [2:0] link;

  always_comb begin
    unique case (mode)
      MODE_H:  link = 3'b111;
      MODE_O:  link = 3'b101;
      default: link = 3'b000;
    endcase
  end

  // Bit entering each nibble from its right-hand (lower) and left-hand (upper) neighbour
  logic [3:0] from_lo, from_hi;
  assign from_lo = {link[2] & a[11], link[1] & a[7], link[0] & a[3], 1'b0};
  assign from_hi = {1'b0, link[2] & a[12], link[1] & a[8], link[0] & a[4]};

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      shl[4*i +: 4] = {a[4*i +: 3], from_lo[i]};
      shr[4*i +: 4] = {from_hi[i], a[4*i+1 +: 3]};
    end
  end

endmodule
