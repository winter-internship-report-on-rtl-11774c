// simd_tb_pkg: test support for the SIMD processor testbenches.
//
// Holds the processor's published 89-instruction sample program with its three
// data words, lane-by-lane reference arithmetic written with plain integers, and
// an instruction-level model of the processor that the testbenches compare the
// RTL with. The model decodes instructions by opcode value on its own, without
// using the RTL's decoder or package.
package simd_tb_pkg;

  localparam int PROG_LEN = 89;
  localparam logic [17:0] SAMPLE_PROG [PROG_LEN] = '{
    18'h26000,
    18'h26401,
    18'h26802,
    18'h00001,
    18'h00008,
    18'h29000,
    18'h2c522,
    18'h00006,
    18'h29403,
    18'h29804,
    18'h29005,
    18'h27402,
    18'h27803,
    18'h27004,
    18'h2d45a,
    18'h25002,
    18'h01001,
    18'h01008,
    18'h07009,
    18'h0d009,
    18'h2a405,
    18'h2a806,
    18'h2a007,
    18'h26405,
    18'h26807,
    18'h0c009,
    18'h06009,
    18'h18001,
    18'h15002,
    18'h0380e,
    18'h0980e,
    18'h21002,
    18'h1b004,
    18'h1e009,
    18'h2c00f,
    18'h2c404,
    18'h2c802,
    18'h12006,
    18'h09008,
    18'h0f40d,
    18'h29407,
    18'h29804,
    18'h29008,
    18'h27406,
    18'h27807,
    18'h27008,
    18'h19001,
    18'h16002,
    18'h0480e,
    18'h0a80e,
    18'h22002,
    18'h1c004,
    18'h1f009,
    18'h2d00f,
    18'h2d404,
    18'h2d802,
    18'h13006,
    18'h0a008,
    18'h1040d,
    18'h2a409,
    18'h2a806,
    18'h2a007,
    18'h28409,
    18'h28806,
    18'h28007,
    18'h2e85a,
    18'h1a001,
    18'h17002,
    18'h0580e,
    18'h0b80e,
    18'h23002,
    18'h1d004,
    18'h20009,
    18'h2e00f,
    18'h2e404,
    18'h2e802,
    18'h14006,
    18'h0b008,
    18'h11405,
    18'h2e45a,
    18'h02001,
    18'h02008,
    18'h08009,
    18'h0e009,
    18'h2b409,
    18'h2b806,
    18'h2b007,
    18'h24010,
    18'h3f000
  };
  localparam logic [15:0] SAMPLE_DATA [3] = '{16'd5, 16'd15, 16'd4};

  // Values the published trace shows being stored on the first pass:
  // {instruction address, stored word}
  localparam int N_TRACE = 16;
  localparam int TRACE_PC [N_TRACE] = '{5, 8, 9, 10, 20, 21, 22, 40, 41, 42, 59, 60, 61, 84, 85, 86};
  localparam logic [15:0] TRACE_VAL [N_TRACE] = '{
    16'd20, 16'd314, 16'd24, 16'd20, 16'h5A5A, 16'h5AD4, 16'h5A72, 16'd52,
    16'd2, 16'd15, 16'h3434, 16'h0202, 16'h0F0F, 16'hAAAA, 16'hAAAA, 16'h9999};

  // lane width in bits for width code 0 (16), 1 (8), 2 (4)
  function automatic int lw(input int form);
    return (form == 1) ? 8 : (form == 2) ? 4 : 16;
  endfunction

  // kind: 0 add, 1 sub, 2 mul, 3 mac (a + b*c), 4 shl, 5 shr
  function automatic logic [15:0] ref_lane(input int kind, input int form,
                                           input logic [15:0] a, input logic [15:0] b,
                                           input logic [15:0] c);
    int w, n, m;
    logic [15:0] y;
    longint x;
    w = lw(form);
    n = 16 / w;
    m = (1 << w) - 1;
    y = '0;
    for (int l = 0; l < n; l++) begin
      longint la, lb, lc;
      la = (a >> (l*w)) & m;
      lb = (b >> (l*w)) & m;
      lc = (c >> (l*w)) & m;
      case (kind)
        0: x = la + lb;
        1: x = la - lb;
        2: x = la * lb;
        3: x = la + lb * lc;
        4: x = la * 2;
        default: x = la / 2;
      endcase
      y |= 16'((x & m) << (l*w));
    end
    return y;
  endfunction

  function automatic logic [15:0] rep_imm(input int form, input logic [9:0] imm);
    case (form)
      1: return {imm[7:0], imm[7:0]};
      2: return {imm[3:0], imm[3:0], imm[3:0], imm[3:0]};
      default: return 16'(imm);
    endcase
  endfunction

  // Instruction-level model. Runs from address 0 until halt or max_steps.
  class simd_model;
    logic [17:0] imem [1024];
    logic [15:0] dmem [1024];
    logic [15:0] r [4];
    int          lc;
    int          steps;
    bit          halted;
    int          loop_taken;

    function new();
      foreach (imem[i]) imem[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (r[i]) r[i] = '0;
      lc = 0; steps = 0; halted = 0; loop_taken = 0;
    endfunction

    function void run(input int max_steps);
      int pc;
      pc = 0;
      while (!halted && steps < max_steps) begin
        logic [17:0] in;
        int op, form, grp, rd, rs, rt;
        logic [9:0] imm;
        in  = imem[pc];
        op  = int'(in[17:12]);
        imm = in[9:0];
        rd  = int'(in[11:10]);
        steps++;
        pc++;
        if (op == 63) begin halted = 1; break; end
        if (op < 36) begin
          grp = op / 3; form = op % 3;
          case (grp)
            0, 2, 4: begin                       // reg-reg add/sub/mul
              rd = int'(in[3:2]); rs = int'(in[1:0]);
              r[rd] = ref_lane(grp / 2, form, r[rd], r[rs], 0);
            end
            1, 3, 5: r[rd] = ref_lane(grp / 2, form, r[rd], rep_imm(form, imm), 0);
            6: begin
              rd = int'(in[5:4]); rs = int'(in[3:2]); rt = int'(in[1:0]);
              r[rd] = ref_lane(3, form, r[rd], r[rs], r[rt]);
            end
            7:  begin rd = int'(in[1:0]); r[rd] = ref_lane(4, form, r[rd], 0, 0); end
            8:  begin rd = int'(in[1:0]); r[rd] = ref_lane(5, form, r[rd], 0, 0); end
            9:  begin rd = int'(in[3:2]); r[rd] = r[rd] & r[int'(in[1:0])]; end
            10: begin rd = int'(in[3:2]); r[rd] = r[rd] | r[int'(in[1:0])]; end
            default: begin rd = int'(in[1:0]); r[rd] = ~r[rd]; end
          endcase
        end else if (op == 36) begin
          if (lc > 0) begin
            lc--;
            if (lc > 0) begin pc = int'(imm); loop_taken++; end
          end
        end else if (op == 37) lc = int'(imm);
        else if (op >= 38 && op <= 40) r[rd] = dmem[imm];
        else if (op >= 41 && op <= 43) dmem[imm] = r[rd];
        else if (op >= 44 && op <= 46) r[rd] = rep_imm(op - 44, imm);
      end
    endfunction
  endclass

endpackage
