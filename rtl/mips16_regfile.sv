// mips16_regfile: eight 16-bit registers of the MIPS-style pipeline.
//
// Two combinational read ports for the ID stage, one write port written by the
// WB stage on the rising edge, and a combinational debug read port. Register 0
// always reads 0 and ignores writes (this design's reading of the core's hazard
// logic, which never stalls on register 0). Synchronous active-high reset clears
// the registers.
module mips16_regfile #(
  parameter int unsigned NREGS = 8,
  localparam int unsigned IW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [IW-1:0] ra,
  input  logic [IW-1:0] rb,
  output logic [15:0]   da,
  output logic [15:0]   db,
  input  logic          we,
  input  logic [IW-1:0] wa,
  input  logic [15:0]   wd,
  input  logic [IW-1:0] dbg_a,
  output logic [15:0]   dbg_d
);

  logic [15:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign da    = (ra == '0) ? '0 : regs[ra];
  assign db    = (rb == '0) ? '0 : regs[rb];
  assign dbg_d = (dbg_a == '0) ? '0 : regs[dbg_a];

endmodule
