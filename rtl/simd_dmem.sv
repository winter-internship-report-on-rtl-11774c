// simd_dmem: data memory of the SIMD processor.
//
// DEPTH words of WIDTH bits (1024 x 16 by default) with two synchronous ports.
// The processor port follows the processor's memory handshake: en (data_R)
// enables an access, and with we (data_W) set the access is a write, otherwise
// a read whose data appears on rdata after the rising edge. The host port
// (h_*) writes or reads at any time and is used to load operands and collect
// results. If both ports write the same word in one cycle the processor wins.
module simd_dmem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  input  logic             h_we,
  input  logic [AW-1:0]    h_addr,
  input  logic [WIDTH-1:0] h_wdata,
  output logic [WIDTH-1:0] h_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    if (en && we) mem[addr] <= wdata;
    if (en && !we) rdata <= mem[addr];
    h_rdata <= mem[h_addr];
  end

endmodule
