// simd_adder: 16-bit SIMD adder/subtractor made of four 4-bit adders.
//
// The carry out of each 4-bit block is forwarded into the next block only when
// both blocks belong to the same lane: always in H (16-bit) mode, between blocks
// 0-1 and 2-3 in O (8-bit) mode, never in Q (4-bit) mode. For subtraction b is
// inverted and a carry of 1 enters at the start of every lane, so each lane
// computes a - b modulo its width. Purely combinational.
//
// The four 4-bit adders and the H/O/Q carry control follow the processor's
// description; the two's-complement subtraction scheme is this design's choice.
module simd_adder
  import simd_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  lane_mode_t  mode,
  input  logic        sub,
  output logic [15:0] sum
);

  logic [15:0] bx;
  logic [3:0]  lane_start;  // nibble i begins a lane

  assign bx = sub ? ~b : b;

  always_comb begin
    unique case (mode)
      MODE_H:  lane_start = 4'b0001;
      MODE_O:  lane_start = 4'b0101;
      default: lane_start = 4'b1111;
    endcase
  end

  // Ripple through the four blocks; cy carries between them
  always_comb begin
    logic [4:0] s;
    logic       cy;
    cy = sub;
    for (int i = 0; i < 4; i++) begin
      s             = {1'b0, a[4*i +: 4]} + {1'b0, bx[4*i +: 4]}
                    + {4'd0, (lane_start[i] ? sub : cy)};
      sum[4*i +: 4] = s[3:0];
      cy            = s[4];
    end
  end

endmodule
