// mips16_connector: the MIPS16 pipeline packaged as a block that loads its
// own program, runs it, then reports the register file one register per clock.
//
// It goes through four phases after reset:
//  1. LOAD: asks for program words 0 .. PROG_WORDS-1 on prog_addr, one per
//     clock, and writes each word on prog_data into the core's instruction
//     ROM. The core is held in reset meanwhile.
//  2. RUN: releases the core and lets it run for RUN_CYCLES clocks.
//  3. DUMP: puts R0..R7 on res, one per clock, with the register number on
//     resou and res_valid high.
//  4. FINISHED: res_valid low. The core keeps running until the next reset.
//
// Interface: the core's PC is brought out on pc. prog_data is sampled on the
// same clock edge that prog_addr points at it, so the program source must be
// combinational, such as a ROM or a testbench table.
//
// What follows the original description: the three phases; the 19-word
// program image; the 81-cycle run; the serial res/resou register report.
// This design's own choices:
//  * The program comes through a port instead of being read from a file.
//  * A reset input is added.
//  * The core is held in reset while the program is loaded.
//  * The DUMP phase reads the registers through the core's debug port.
//  * res_valid is added.
module mips16_connector #(
  parameter int unsigned PROG_WORDS = 19,
  parameter int unsigned RUN_CYCLES = 81,
  localparam int unsigned PW = $clog2(PROG_WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [PW-1:0] prog_addr,
  input  logic [15:0]   prog_data,
  output logic [7:0]    pc,
  output logic [15:0]   res,
  output logic [3:0]    resou,
  output logic          res_valid
);

  typedef enum logic [1:0] {PH_LOAD, PH_RUN, PH_DUMP, PH_FINISHED} phase_t;

  phase_t      phase;
  logic [15:0] count;
  logic [2:0]  reg_idx;
  logic [15:0] reg_data;
  logic [15:0] mem_data;
  logic        core_stall, core_branch;

  assign prog_addr = PW'(count);

  mips16_core #(.PC_WIDTH(8)) u_core (
    .clk,
    .rst(rst || phase == PH_LOAD),
    .pc,
    .imem_we(!rst && phase == PH_LOAD),
    .imem_waddr(count[7:0]),
    .imem_wdata(prog_data),
    .dbg_reg_addr(reg_idx),
    .dbg_reg_data(reg_data),
    .dbg_mem_addr(8'd0),
    .dbg_mem_data(mem_data),
    .stall(core_stall),
    .branch_taken(core_branch)
  );

  assign reg_idx = count[2:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= PH_LOAD;
      count     <= '0;
      res       <= '0;
      resou     <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      unique case (phase)
        PH_LOAD: begin
          if (count == 16'(PROG_WORDS - 1)) begin phase <= PH_RUN; count <= '0; end
          else count <= count + 16'd1;
        end
        PH_RUN: begin
          if (count == 16'(RUN_CYCLES - 1)) begin phase <= PH_DUMP; count <= '0; end
          else count <= count + 16'd1;
        end
        PH_DUMP: begin
          res       <= reg_data;
          resou     <= {1'b0, reg_idx};
          res_valid <= 1'b1;
          if (count == 16'd7) phase <= PH_FINISHED;
          count <= count + 16'd1;
        end
        default: ;
      endcase
    end
  end

endmodule
