// mips16_dmem: data RAM of the MIPS-style pipeline (MEM stage).
//
// DEPTH 16-bit words, combinational read (LD completes in MEM), write on the
// rising edge when we is high (ST). A second combinational read port lets a
// host inspect results. The depth (256 words) is this design's choice.
module mips16_dmem #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [15:0]   dbg_data
);

  logic [15:0] ram [DEPTH];

  always_ff @(posedge clk) if (we) ram[addr] <= wdata;

  assign rdata    = ram[addr];
  assign dbg_data = ram[dbg_addr];

endmodule
