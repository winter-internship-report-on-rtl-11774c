// simd_regfile: register file of the SIMD processor.
//
// NREGS 16-bit registers (four by default, addressed by a 2-bit index), three
// asynchronous read ports (a MAC instruction reads three registers) and one
// write port written on the rising clock edge. A synchronous, active-high reset
// clears every register. The 2-bit register index follows the processor's block
// diagram; the port count, read timing and reset are this design's choices.
module simd_regfile #(
  parameter int unsigned NREGS = 4,
  parameter int unsigned W     = 16,
  localparam int unsigned IW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [IW-1:0] ra,
  input  logic [IW-1:0] rb,
  input  logic [IW-1:0] rc,
  output logic [W-1:0]  da,
  output logic [W-1:0]  db,
  output logic [W-1:0]  dc,
  input  logic          we,
  input  logic [IW-1:0] wa,
  input  logic [W-1:0]  wd
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign da = regs[ra];
  assign db = regs[rb];
  assign dc = regs[rc];

endmodule
