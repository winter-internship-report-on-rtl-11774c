// mips16_hazard: data hazard detection of the MIPS-style pipeline.
//
// The core has no forwarding. An instruction in ID that reads a register still
// to be written by an instruction in EX, MEM or WB must wait: stall is raised
// while either used source register (other than register 0) equals the
// destination of a writing instruction in one of those three stages. While
// stall is high the core holds PC and the IF/ID register and sends a bubble
// into EX. Comparing with the EX, MEM and WB destinations and ignoring register
// 0 follows the core's hazard logic. Purely combinational.
module mips16_hazard (
  input  logic [2:0] src1,
  input  logic       use1,
  input  logic [2:0] src2,
  input  logic       use2,
  input  logic [2:0] ex_dest,
  input  logic       ex_wr,
  input  logic [2:0] mem_dest,
  input  logic       mem_wr,
  input  logic [2:0] wb_dest,
  input  logic       wb_wr,
  output logic       stall
);

  function automatic logic pending(input logic [2:0] s);
    return (s != 3'd0) &&
           ((ex_wr && ex_dest == s) || (mem_wr && mem_dest == s) || (wb_wr && wb_dest == s));
  endfunction

  assign stall = (use1 && pending(src1)) || (use2 && pending(src2));

endmodule
