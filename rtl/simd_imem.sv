// simd_imem: instruction memory of the SIMD processor.
//
// DEPTH words of WIDTH bits (1024 x 18 by default, a 10-bit address). The
// processor side reads synchronously: rdata holds mem[raddr] sampled at the last
// rising edge, so an instruction is available one cycle after its address. A
// write port loads the program (normally while the processor is held in reset).
// Size from the processor's description; the load port is this design's.
module simd_imem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 18,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
