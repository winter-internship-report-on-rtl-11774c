// mips16_imem: instruction ROM of the MIPS-style pipeline (IF stage).
//
// DEPTH 16-bit words (256, one per value of the 8-bit PC), read combinationally
// so that IF fetches one instruction per cycle. A write port loads the program;
// the ROM itself has no reset (contents are whatever was loaded).
module mips16_imem #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   data,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata
);

  logic [15:0] rom [DEPTH];

  always_ff @(posedge clk) if (we) rom[waddr] <= wdata;

  assign data = rom[addr];

endmodule
