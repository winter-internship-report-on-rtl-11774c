// esim_top: three independent designs side by side, sharing only the clock.
//
//  * simd_system - an 18-bit-instruction SIMD processor (16-bit words split into
//    4-, 8- or 16-bit lanes) with its instruction and data memories. Load a
//    program and data while simd_rst is high, release it, wait for simd_done.
//  * mips16_core - a 16-bit five-stage pipelined MIPS-style processor with
//    stall-based hazard handling. Load a program while mips_rst is high.
//  * the small logic circuits: 4:1 multiplexer, 1:4 demultiplexer, 74138
//    decoder, D, JK flip-flops, gated SR latch, bidirectional shift register
//    and up/down counter, each with its own ports (the clocked ones use clk;
//    the SR latch is transparent while clk is high).
//  * simd_connector - the SIMD processor as a pin-driven block: operands on
//    simd_conn_a/b/c, one instruction on simd_conn_inst_in, the processor bus
//    brought out.
//  * mips16_connector - the MIPS16 pipeline as a self-loading block: it fetches
//    a 19-word program on mips_conn_prog_addr/data, runs it and reports R0..R7
//    on mips_conn_res/resou.
// Each design keeps the timing of its own module; see those files.
module esim_top
  import simd_pkg::AW, simd_pkg::IW, simd_pkg::DW;
(
  input  logic          clk,
  // ---- SIMD processor ----
  input  logic          simd_rst,
  input  logic          simd_prog_we,
  input  logic [AW-1:0] simd_prog_addr,
  input  logic [IW-1:0] simd_prog_data,
  input  logic          simd_host_we,
  input  logic [AW-1:0] simd_host_addr,
  input  logic [DW-1:0] simd_host_wdata,
  output logic [DW-1:0] simd_host_rdata,
  output logic          simd_done,
  output logic [AW-1:0] simd_pc,
  // ---- MIPS16 pipeline ----
  input  logic          mips_rst,
  input  logic          mips_imem_we,
  input  logic [7:0]    mips_imem_waddr,
  input  logic [15:0]   mips_imem_wdata,
  input  logic [2:0]    mips_dbg_reg_addr,
  output logic [15:0]   mips_dbg_reg_data,
  input  logic [7:0]    mips_dbg_mem_addr,
  output logic [15:0]   mips_dbg_mem_data,
  output logic [7:0]    mips_pc,
  output logic          mips_stall,
  output logic          mips_branch_taken,
  // ---- SIMD connector block ----
  input  logic          simd_conn_rst,
  input  logic [DW-1:0] simd_conn_a,
  input  logic [DW-1:0] simd_conn_b,
  input  logic [DW-1:0] simd_conn_c,
  input  logic [IW-1:0] simd_conn_inst_in,
  output logic          simd_conn_done,
  output logic [IW-1:0] simd_conn_instruction_in,
  output logic [DW-1:0] simd_conn_data_in,
  output logic [DW-1:0] simd_conn_data_out,
  output logic [AW-1:0] simd_conn_instruction_addr,
  output logic [AW-1:0] simd_conn_data_addr,
  output logic          simd_conn_data_R,
  output logic          simd_conn_data_W,
  input  logic [AW-1:0] simd_conn_res_addr,
  output logic [DW-1:0] simd_conn_res_data,
  // ---- MIPS16 connector block ----
  input  logic          mips_conn_rst,
  output logic [4:0]    mips_conn_prog_addr,
  input  logic [15:0]   mips_conn_prog_data,
  output logic [7:0]    mips_conn_pc,
  output logic [15:0]   mips_conn_res,
  output logic [3:0]    mips_conn_resou,
  output logic          mips_conn_res_valid,
  // ---- small circuits ----
  input  logic [3:0]    mu_mux_a,
  input  logic [3:0]    mu_mux_b,
  input  logic [3:0]    mu_mux_c,
  input  logic [3:0]    mu_mux_d,
  input  logic [1:0]    mu_mux_sel,
  output logic [3:0]    mu_mux_y,
  input  logic [3:0]    mu_demux_din,
  input  logic [1:0]    mu_demux_sel,
  output logic [15:0]   mu_demux_y,      // {y3, y2, y1, y0}
  input  logic [2:0]    mu_dec_abc,      // {a, b, c}
  input  logic [2:0]    mu_dec_en,       // {e1_n, e2_n, e3}
  output logic [7:0]    mu_dec_y_n,
  input  logic          mu_reset,
  input  logic          mu_d,
  output logic          mu_dff_q,
  input  logic          mu_j,
  input  logic          mu_k,
  output logic          mu_jk_q,
  output logic          mu_jk_qb,
  input  logic          mu_s,
  input  logic          mu_r,
  output logic          mu_sr_q,
  output logic          mu_sr_qbar,
  input  logic          mu_right_sel,
  input  logic          mu_shift_din,
  output logic [3:0]    mu_shift_dout,
  output logic          mu_shift_s_left,
  output logic          mu_shift_s_right,
  input  logic          mu_up_high,
  output logic [3:0]    mu_count
);

  simd_system u_simd (
    .clk, .rst(simd_rst),
    .prog_we(simd_prog_we), .prog_addr(simd_prog_addr), .prog_data(simd_prog_data),
    .host_we(simd_host_we), .host_addr(simd_host_addr), .host_wdata(simd_host_wdata),
    .host_rdata(simd_host_rdata), .done(simd_done), .pc(simd_pc)
  );

  mips16_core #(.PC_WIDTH(8)) u_mips (
    .clk, .rst(mips_rst), .pc(mips_pc),
    .imem_we(mips_imem_we), .imem_waddr(mips_imem_waddr), .imem_wdata(mips_imem_wdata),
    .dbg_reg_addr(mips_dbg_reg_addr), .dbg_reg_data(mips_dbg_reg_data),
    .dbg_mem_addr(mips_dbg_mem_addr), .dbg_mem_data(mips_dbg_mem_data),
    .stall(mips_stall), .branch_taken(mips_branch_taken)
  );

  simd_connector u_simd_conn (
    .clk, .rst(simd_conn_rst),
    .a(simd_conn_a), .b(simd_conn_b), .c(simd_conn_c), .inst_in(simd_conn_inst_in),
    .done(simd_conn_done), .instruction_in(simd_conn_instruction_in),
    .data_in(simd_conn_data_in), .data_out(simd_conn_data_out),
    .instruction_addr(simd_conn_instruction_addr), .data_addr(simd_conn_data_addr),
    .data_R(simd_conn_data_R), .data_W(simd_conn_data_W),
    .res_addr(simd_conn_res_addr), .res_data(simd_conn_res_data)
  );

  mips16_connector #(.PROG_WORDS(19), .RUN_CYCLES(81)) u_mips_conn (
    .clk, .rst(mips_conn_rst),
    .prog_addr(mips_conn_prog_addr), .prog_data(mips_conn_prog_data), .pc(mips_conn_pc),
    .res(mips_conn_res), .resou(mips_conn_resou), .res_valid(mips_conn_res_valid)
  );

  mu_mux4 #(.W(4)) u_mux (.a(mu_mux_a), .b(mu_mux_b), .c(mu_mux_c), .d(mu_mux_d), .sel(mu_mux_sel), .y(mu_mux_y));

  mu_demux4 #(.W(4)) u_demux (.din(mu_demux_din), .sel(mu_demux_sel),
    .y0(mu_demux_y[3:0]), .y1(mu_demux_y[7:4]), .y2(mu_demux_y[11:8]), .y3(mu_demux_y[15:12]));

  dec74138 u_dec (.a(mu_dec_abc[2]), .b(mu_dec_abc[1]), .c(mu_dec_abc[0]),
    .e1_n(mu_dec_en[2]), .e2_n(mu_dec_en[1]), .e3(mu_dec_en[0]), .y_n(mu_dec_y_n));

  mu_dff u_dff (.clk, .reset(mu_reset), .d(mu_d), .q(mu_dff_q));

  mu_jkff u_jk (.clk, .rst(mu_reset), .j(mu_j), .k(mu_k), .q(mu_jk_q), .qb(mu_jk_qb));

  mu_srff u_sr (.clk, .s(mu_s), .r(mu_r), .q(mu_sr_q), .qbar(mu_sr_qbar));

  mu_univ_shift u_shift (.clk, .reset(mu_reset), .right_sel(mu_right_sel), .din(mu_shift_din),
    .dout(mu_shift_dout), .s_left(mu_shift_s_left), .s_right(mu_shift_s_right));

  mu_updown #(.W(4)) u_cnt (.clk, .reset(mu_reset), .up_high(mu_up_high), .count(mu_count));

endmodule
