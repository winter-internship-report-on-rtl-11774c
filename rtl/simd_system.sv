// simd_system: the SIMD processor with its instruction and data memories.
//
// Instantiates simd_cpu, a 1024 x 18 instruction memory and a 1024 x 16 data
// memory and wires them as in the processor's block diagram. A host loads the
// program through prog_* and operands through host_* while rst is high, then
// releases rst; done rises when the program executes halt, after which results
// are read back through host_addr/host_rdata (one cycle read latency).
module simd_system
  import simd_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [IW-1:0] prog_data,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [DW-1:0] host_wdata,
  output logic [DW-1:0] host_rdata,
  output logic          done,
  output logic [AW-1:0] pc
);

  logic [IW-1:0] instruction_in;
  logic [DW-1:0] data_in, data_out;
  logic [AW-1:0] data_addr;
  logic          data_R, data_W;

  simd_cpu u_cpu (
    .clk, .rst,
    .instruction_in, .data_in, .data_out,
    .instruction_addr(pc), .data_addr, .data_R, .data_W, .done
  );

  simd_imem #(.DEPTH(1 << AW), .WIDTH(IW)) u_imem (
    .clk, .raddr(pc), .rdata(instruction_in),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  simd_dmem #(.DEPTH(1 << AW), .WIDTH(DW)) u_dmem (
    .clk, .en(data_R), .we(data_W), .addr(data_addr), .wdata(data_out), .rdata(data_in),
    .h_we(host_we), .h_addr(host_addr), .h_wdata(host_wdata), .h_rdata(host_rdata)
  );

endmodule
