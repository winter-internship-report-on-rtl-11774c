// esim_top_tb: end-to-end test of the whole top level at its default sizes.
//  * SIMD processor: loads the published 89-instruction sample program and its
//    data through the host ports, runs it to halt, checks every data word
//    against the instruction-level model and the 5-cycle instruction timing,
//    and counts the mechanisms it used: loop jump, halt, loads, stores and
//    instructions in each lane width (16, 8, 4 bits).
//  * MIPS16 pipeline: runs the published test program (R1..R6, ram[10], and
//    R7 = taken branches) and counts stalls and taken branches.
//  * SIMD connector block: two runs with random a, b, c, first adding a and b
//    as in the original example, then an 8-bit multiply. Checks the stored
//    words 3..5, the 43-cycle run, and counts stores and fetches of the pin
//    instruction.
//  * MIPS16 connector block: loads the test program through its fetch port,
//    runs it for 81 cycles and checks the serial report R0..R7 = 0, 8, 16, 24,
//    40, 40, 0, 3; counts program words fetched and reports.
//  * Small circuits: driven concurrently with the processors, each checked
//    against its truth table or a tracked state, with mux/demux selections,
//    decoder enabled/disabled, flip-flop set/reset/toggle, SR latch set, reset
//    and forbidden input, shift left/right and counter wrap in both directions
//    counted.
// Every counted mechanism must occur at least once.
module esim_top_tb;
  import simd_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  // SIMD
  logic simd_rst, simd_prog_we, simd_host_we, simd_done;
  logic [9:0] simd_prog_addr, simd_host_addr, simd_pc;
  logic [17:0] simd_prog_data;
  logic [15:0] simd_host_wdata, simd_host_rdata;
  // MIPS
  logic mips_rst, mips_imem_we, mips_stall, mips_branch_taken;
  logic [7:0] mips_imem_waddr, mips_dbg_mem_addr, mips_pc;
  logic [15:0] mips_imem_wdata, mips_dbg_reg_data, mips_dbg_mem_data;
  logic [2:0] mips_dbg_reg_addr;
  // small circuits
  logic [3:0] mu_mux_a, mu_mux_b, mu_mux_c, mu_mux_d, mu_mux_y, mu_demux_din, mu_shift_dout, mu_count;
  logic [1:0] mu_mux_sel, mu_demux_sel;
  logic [15:0] mu_demux_y;
  logic [2:0] mu_dec_abc, mu_dec_en;
  logic [7:0] mu_dec_y_n;
  logic mu_reset, mu_d, mu_dff_q, mu_j, mu_k, mu_jk_q, mu_jk_qb, mu_s, mu_r, mu_sr_q, mu_sr_qbar;
  // connector blocks
  logic simd_conn_rst, simd_conn_done, simd_conn_data_R, simd_conn_data_W;
  logic [15:0] simd_conn_a, simd_conn_b, simd_conn_c, simd_conn_data_in, simd_conn_data_out, simd_conn_res_data;
  logic [17:0] simd_conn_inst_in, simd_conn_instruction_in;
  logic [9:0] simd_conn_instruction_addr, simd_conn_data_addr, simd_conn_res_addr;
  logic mips_conn_rst, mips_conn_res_valid;
  logic [4:0] mips_conn_prog_addr;
  logic [15:0] mips_conn_prog_data, mips_conn_res;
  logic [7:0] mips_conn_pc;
  logic [3:0] mips_conn_resou;
  logic mu_right_sel, mu_shift_din, mu_shift_s_left, mu_shift_s_right, mu_up_high;

  esim_top dut (.*);

  int checks = 0, failures = 0;
  bit simd_finished = 0, mips_finished = 0, mu_finished = 0, conn_finished = 0, mconn_finished = 0;

  // mechanism counters
  int n_loopjump, n_halt, n_load, n_store, n_mode16, n_mode8, n_mode4;
  int n_stall, n_branch;
  int n_mux_sel [4], n_demux_sel [4], n_dec_on, n_dec_off, n_dff_rst, n_jk_tog, n_jk_set, n_jk_clr;
  int n_conn_store, n_conn_pin_fetch, n_conn_done, n_mconn_fetch, n_mconn_report;
  int n_sr_set, n_sr_clr, n_sr_both, n_shl, n_shr, n_wrap_up, n_wrap_dn;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---------------- SIMD ----------------
  initial begin
    simd_model m;
    int cycles;
    simd_rst = 1; simd_prog_we = 0; simd_host_we = 0;
    simd_prog_addr = 0; simd_host_addr = 0; simd_prog_data = 0; simd_host_wdata = 0;
    m = new();
    for (int i = 0; i < PROG_LEN; i++) m.imem[i] = SAMPLE_PROG[i];
    for (int i = 0; i < 3; i++) m.dmem[i] = SAMPLE_DATA[i];
    m.run(100000);
    n_loopjump = m.loop_taken;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      simd_prog_we = 1; simd_prog_addr = 10'(i); simd_prog_data = m.imem[i];
      simd_host_we = 1; simd_host_addr = 10'(i); simd_host_wdata = (i < 3) ? SAMPLE_DATA[i] : 16'h0;
    end
    @(negedge clk); simd_prog_we = 0; simd_host_we = 0;
    @(posedge clk); #1 simd_rst = 0;
    cycles = 0;
    while (!simd_done && cycles < 10000) begin
      @(posedge clk); #1; cycles++;
      // ID-state instruction classes, seen on the instruction bus
      if (dut.u_simd.u_cpu.state == 3'd2) begin
        int opc;
        opc = int'(dut.u_simd.u_cpu.instruction_in[17:12]);
        if (opc < 36 || (opc >= 38 && opc <= 46)) begin
          int form;
          form = (opc < 36) ? opc % 3 : (opc - 38) % 3;
          if (form == 0) n_mode16++; else if (form == 1) n_mode8++; else n_mode4++;
        end
      end
      if (dut.u_simd.u_cpu.data_R && !dut.u_simd.u_cpu.data_W) n_load++;
      if (dut.u_simd.u_cpu.data_R && dut.u_simd.u_cpu.data_W) n_store++;
    end
    checks++;
    if (!simd_done) fail("SIMD never halted"); else n_halt++;
    checks++;
    if (cycles != 1 + 5 * (m.steps - 1) + 2) fail($sformatf("SIMD took %0d cycles for %0d instructions", cycles, m.steps));
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); simd_host_addr = 10'(i);
      @(posedge clk); #1;
      checks++;
      if (simd_host_rdata !== m.dmem[i]) fail($sformatf("SIMD mem[%0d]=%h exp %h", i, simd_host_rdata, m.dmem[i]));
    end
    $display("SIMD: %0d instructions in %0d cycles", m.steps, cycles);
    simd_finished = 1;
  end

  // ---------------- MIPS16 ----------------
  always @(posedge clk) if (!mips_rst) begin
    if (mips_stall) n_stall++;
    if (mips_branch_taken) n_branch++;
  end

  initial begin
    logic [15:0] prog [256];
    logic [15:0] exp_r [8];
    mips_rst = 1; mips_imem_we = 0; mips_imem_waddr = 0; mips_imem_wdata = 0;
    mips_dbg_reg_addr = 0; mips_dbg_mem_addr = 0;
    foreach (prog[i]) prog[i] = '0;
    prog[0] = 16'b1001_001_000_001000; prog[1] = 16'b1001_010_001_001000;
    prog[2] = 16'b1001_011_010_001000; prog[3] = 16'b0001_100_010_011_000;
    prog[4] = 16'b1011_100_001_000010; prog[5] = 16'b1010_101_001_000010;
    prog[6] = 16'b0010_110_100_101_000; prog[7] = 16'b1100_000_110_111000;
    prog[8] = 16'b1001_111_111_000001;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); mips_imem_we = 1; mips_imem_waddr = 8'(i); mips_imem_wdata = prog[i];
    end
    @(negedge clk); mips_imem_we = 0;
    @(posedge clk); #1 mips_rst = 0;
    wait (n_branch == 3);
    repeat (4) @(posedge clk);
    exp_r = '{16'd0, 16'd8, 16'd16, 16'd24, 16'd40, 16'd40, 16'd0, 16'd3};
    for (int r = 0; r < 8; r++) begin
      mips_dbg_reg_addr = 3'(r); #1; checks++;
      if (mips_dbg_reg_data !== exp_r[r]) fail($sformatf("MIPS R%0d=%0d exp %0d", r, mips_dbg_reg_data, exp_r[r]));
    end
    mips_dbg_mem_addr = 8'd10; #1; checks++;
    if (mips_dbg_mem_data !== 16'd40) fail($sformatf("MIPS ram[10]=%0d", mips_dbg_mem_data));
    mips_finished = 1;
  end

  // ---------------- SIMD connector block ----------------
  always @(posedge clk) if (!simd_conn_rst) begin
    if (simd_conn_data_R && simd_conn_data_W) n_conn_store++;
    if (dut.u_simd_conn.u_cpu.state == 3'd2 && simd_conn_instruction_addr == 10'd3 &&
        simd_conn_instruction_in == simd_conn_inst_in) n_conn_pin_fetch++;
  end

  initial begin
    simd_conn_rst = 1; simd_conn_res_addr = 0; simd_conn_inst_in = 0;
    {simd_conn_a, simd_conn_b, simd_conn_c} = '0;
    for (int t = 0; t < 2; t++) begin
      simd_model m;
      int cycles;
      m = new();
      simd_conn_a = 16'($urandom); simd_conn_b = 16'($urandom); simd_conn_c = 16'($urandom);
      simd_conn_inst_in = (t == 0) ? {6'd0, 8'd0, 2'd0, 2'd1}     // add16 R0 += R1
                                   : {6'd13, 8'd0, 2'd2, 2'd0};   // mul8 R2 *= R0
      foreach (m.imem[i]) m.imem[i] = 18'h3f000;
      m.imem[0] = {6'd38, 2'd0, 10'd0}; m.imem[1] = {6'd38, 2'd1, 10'd1}; m.imem[2] = {6'd38, 2'd2, 10'd2};
      m.imem[3] = simd_conn_inst_in;
      m.imem[4] = {6'd41, 2'd0, 10'd0}; m.imem[5] = {6'd41, 2'd1, 10'd3};
      m.imem[6] = {6'd41, 2'd2, 10'd4}; m.imem[7] = {6'd41, 2'd0, 10'd5};
      m.dmem[0] = simd_conn_a; m.dmem[1] = simd_conn_b; m.dmem[2] = simd_conn_c;
      m.run(100);
      @(negedge clk); simd_conn_rst = 1;
      repeat (2) @(negedge clk);
      simd_conn_rst = 0;
      cycles = 0;
      while (!simd_conn_done && cycles < 200) begin @(posedge clk); #1; cycles++; end
      checks++;
      if (!simd_conn_done || cycles != 43) fail($sformatf("SIMD connector done=%0b after %0d cycles", simd_conn_done, cycles));
      else n_conn_done++;
      for (int w = 3; w <= 5; w++) begin
        @(negedge clk); simd_conn_res_addr = 10'(w);
        @(posedge clk); #1; checks++;
        if (simd_conn_res_data !== m.dmem[w])
          fail($sformatf("SIMD connector word %0d = %h, expected %h", w, simd_conn_res_data, m.dmem[w]));
      end
      if (t == 0) begin
        checks++;
        if (m.dmem[5] !== simd_conn_a + simd_conn_b) fail("SIMD connector model: a + b");
      end
    end
    conn_finished = 1;
  end

  // ---------------- MIPS16 connector block ----------------
  logic [15:0] mconn_prog [19];
  assign mips_conn_prog_data = (mips_conn_prog_addr < 5'd19) ? mconn_prog[mips_conn_prog_addr] : 16'h0;

  initial begin
    logic [15:0] exp_r [8];
    int n_rep;
    exp_r = '{16'd0, 16'd8, 16'd16, 16'd24, 16'd40, 16'd40, 16'd0, 16'd3};
    foreach (mconn_prog[i]) mconn_prog[i] = '0;
    mconn_prog[0] = {4'd9, 3'd1, 3'd0, 6'd8};       mconn_prog[1] = {4'd9, 3'd2, 3'd1, 6'd8};
    mconn_prog[2] = {4'd9, 3'd3, 3'd2, 6'd8};       mconn_prog[3] = {4'd1, 3'd4, 3'd2, 3'd3, 3'd0};
    mconn_prog[4] = {4'd11, 3'd4, 3'd1, 6'd2};      mconn_prog[5] = {4'd10, 3'd5, 3'd1, 6'd2};
    mconn_prog[6] = {4'd2, 3'd6, 3'd4, 3'd5, 3'd0}; mconn_prog[7] = {4'd12, 3'd0, 3'd6, 6'b111000};
    mconn_prog[8] = {4'd9, 3'd7, 3'd7, 6'd1};
    mips_conn_rst = 1;
    repeat (2) @(negedge clk);
    mips_conn_rst = 0;
    n_rep = 0;
    for (int cyc = 1; cyc <= 120; cyc++) begin
      if (cyc <= 19) begin
        checks++;
        if (mips_conn_prog_addr !== 5'(cyc - 1)) fail("MIPS connector fetch address");
        else n_mconn_fetch++;
      end
      @(posedge clk); #1;
      if (mips_conn_res_valid) begin
        checks++;
        if (mips_conn_resou !== 4'(n_rep) || mips_conn_res !== exp_r[n_rep])
          fail($sformatf("MIPS connector R%0d = %0d, expected R%0d = %0d", mips_conn_resou, mips_conn_res, n_rep, exp_r[n_rep]));
        else n_mconn_report++;
        n_rep++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_rep != 8) fail($sformatf("MIPS connector gave %0d reports", n_rep));
    mconn_finished = 1;
  end

  // ---------------- small circuits ----------------
  initial begin
    logic dq, jq, srs;
    logic [3:0] sh;
    int cnt;
    mu_reset = 1; mu_d = 0; mu_j = 0; mu_k = 0; mu_s = 0; mu_r = 0; mu_right_sel = 0;
    mu_shift_din = 0; mu_up_high = 1;
    {mu_mux_a, mu_mux_b, mu_mux_c, mu_mux_d, mu_mux_sel, mu_demux_din, mu_demux_sel, mu_dec_abc, mu_dec_en} = '0;
    @(posedge clk); #1;
    // SR latch into a known state: reset while clk is high
    @(posedge clk); #1 mu_r = 1; @(negedge clk); mu_r = 0;
    srs = 0; dq = 0; jq = 0; sh = 0; cnt = 0;
    mu_reset = 0;
    for (int i = 0; i < 600; i++) begin
      // inputs change while clk is low (each pass starts just after a falling edge)
      {mu_mux_a, mu_mux_b, mu_mux_c, mu_mux_d} = 16'($urandom); mu_mux_sel = 2'($urandom);
      mu_demux_din = 4'($urandom); mu_demux_sel = 2'($urandom);
      mu_dec_abc = 3'($urandom); mu_dec_en = ($urandom_range(0, 1) == 1) ? 3'b001 : 3'($urandom);
      mu_reset = ($urandom_range(0, 30) == 0);
      mu_d = 1'($urandom); {mu_j, mu_k} = 2'($urandom);
      mu_right_sel = ((i / 25) % 2 == 1); mu_shift_din = 1'($urandom);
      mu_up_high = ((i / 40) % 2 == 0);
      #1;
      // combinational circuits
      checks += 3;
      if (mu_mux_y !== ((mu_mux_sel == 0) ? mu_mux_a : (mu_mux_sel == 1) ? mu_mux_b : (mu_mux_sel == 2) ? mu_mux_c : mu_mux_d))
        fail("mux");
      n_mux_sel[mu_mux_sel]++;
      if (mu_demux_y !== (16'(mu_demux_din) << (4 * mu_demux_sel))) fail("demux");
      n_demux_sel[mu_demux_sel]++;
      if (mu_dec_en == 3'b001) begin
        n_dec_on++;
        if (mu_dec_y_n !== ~(8'd1 << mu_dec_abc)) fail("decoder enabled");
      end else begin
        n_dec_off++;
        if (mu_dec_y_n !== 8'hFF) fail("decoder disabled");
      end
      // SR latch: apply s/r during the next high phase
      {mu_s, mu_r} = 2'($urandom);
      // expected next states of the clocked circuits
      if (mu_reset) begin dq = 0; jq = 0; sh = 0; cnt = 0; n_dff_rst++; end
      else begin
        dq = mu_d;
        case ({mu_j, mu_k})
          2'b01: begin jq = 0; n_jk_clr++; end
          2'b10: begin jq = 1; n_jk_set++; end
          2'b11: begin jq = ~jq; n_jk_tog++; end
          default: ;
        endcase
        if (mu_right_sel) begin sh = {mu_shift_din, sh[3:1]}; n_shr++; end
        else              begin sh = {sh[2:0], mu_shift_din}; n_shl++; end
        if (mu_up_high) begin if (cnt == 15) n_wrap_up++; cnt = (cnt + 1) % 16; end
        else            begin if (cnt == 0) n_wrap_dn++; cnt = (cnt + 15) % 16; end
      end
      @(posedge clk); #1;
      checks += 5;
      if (mu_dff_q !== dq) fail("dff");
      if (mu_jk_q !== jq || mu_jk_qb !== ~jq) fail("jk");
      if (mu_shift_dout !== sh || mu_shift_s_left !== sh[0] || mu_shift_s_right !== sh[3]) fail("shift");
      if (mu_count !== 4'(cnt)) fail($sformatf("counter %0d exp %0d up=%0b rst=%0b", mu_count, cnt, mu_up_high, mu_reset));
      if (mu_s && mu_r) begin
        n_sr_both++;
        if (!(mu_sr_q && mu_sr_qbar)) fail("SR both high");
      end else begin
        if (mu_s) begin srs = 1; n_sr_set++; end
        if (mu_r) begin srs = 0; n_sr_clr++; end
        if (mu_sr_q !== srs || mu_sr_qbar !== ~srs) fail("SR latch");
      end
      @(negedge clk); mu_s = 0; mu_r = 0;
      #1; checks++;
      if (!(mu_sr_q === srs && mu_sr_qbar === ~srs) && !(mu_sr_q && mu_sr_qbar)) fail("SR hold");
    end
    mu_finished = 1;
  end

  // ---------------- summary ----------------
  initial begin
    wait (simd_finished && mips_finished && mu_finished && conn_finished && mconn_finished);
    $display("SIMD mechanisms: loopjump=%0d halt=%0d load=%0d store=%0d 16b=%0d 8b=%0d 4b=%0d",
             n_loopjump, n_halt, n_load, n_store, n_mode16, n_mode8, n_mode4);
    $display("MIPS mechanisms: stall cycles=%0d taken branches=%0d", n_stall, n_branch);
    $display("connectors: SIMD stores=%0d pin fetches=%0d runs done=%0d, MIPS words fetched=%0d reports=%0d",
             n_conn_store, n_conn_pin_fetch, n_conn_done, n_mconn_fetch, n_mconn_report);
    $display("circuits: mux sel=%p demux sel=%p dec on/off=%0d/%0d dff reset=%0d jk set/clr/tog=%0d/%0d/%0d",
             n_mux_sel, n_demux_sel, n_dec_on, n_dec_off, n_dff_rst, n_jk_set, n_jk_clr, n_jk_tog);
    $display("          sr set/clr/both=%0d/%0d/%0d shift l/r=%0d/%0d wrap up/down=%0d/%0d",
             n_sr_set, n_sr_clr, n_sr_both, n_shl, n_shr, n_wrap_up, n_wrap_dn);
    foreach (n_mux_sel[i]) begin checks++; if (n_mux_sel[i] == 0) fail("mux select never used"); end
    foreach (n_demux_sel[i]) begin checks++; if (n_demux_sel[i] == 0) fail("demux select never used"); end
    checks += 27;
    if (n_conn_store == 0) fail("no SIMD connector store");
    if (n_conn_pin_fetch == 0) fail("SIMD connector pin instruction never fetched");
    if (n_conn_done == 0) fail("SIMD connector never finished");
    if (n_mconn_fetch == 0) fail("MIPS connector fetched no program word");
    if (n_mconn_report == 0) fail("MIPS connector reported nothing");
    if (n_loopjump == 0) fail("no loop jump");
    if (n_halt == 0) fail("no halt");
    if (n_load == 0) fail("no load");
    if (n_store == 0) fail("no store");
    if (n_mode16 == 0) fail("no 16-bit op");
    if (n_mode8 == 0) fail("no 8-bit op");
    if (n_mode4 == 0) fail("no 4-bit op");
    if (n_stall == 0) fail("no stall");
    if (n_branch == 0) fail("no branch");
    if (n_dec_on == 0) fail("decoder never enabled");
    if (n_dec_off == 0) fail("decoder never disabled");
    if (n_dff_rst == 0) fail("no reset");
    if (n_jk_set == 0) fail("no jk set");
    if (n_jk_clr == 0) fail("no jk clear");
    if (n_jk_tog == 0) fail("no jk toggle");
    if (n_sr_set == 0) fail("no sr set");
    if (n_sr_clr == 0) fail("no sr reset");
    if (n_sr_both == 0) fail("no sr s=r=1");
    if (n_shl == 0) fail("no left shift");
    if (n_shr == 0) fail("no right shift");
    if (n_wrap_up == 0) fail("no up wrap");
    if (n_wrap_dn == 0) fail("no down wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
