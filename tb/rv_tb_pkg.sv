// rv_tb_pkg: testbench helpers for whole-CPU tests.
// Instruction encoders for RV32I (one function per format plus mnemonics),
// and rv_iss, an instruction-set reference model that executes one
// instruction per step on its own registers and byte memory and reports
// what the instruction wrote, so that each instruction completed by the
// pipeline can be compared with it.
package rv_tb_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_i(input int imm, input int rs1, input logic [2:0] f3,
                                        input int rd, input logic [6:0] opc);
    return {12'(imm), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'h23};
  endfunction
  function automatic logic [31:0] enc_b(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'h63};
  endfunction
  function automatic logic [31:0] enc_u(input logic [19:0] imm, input int rd, input logic [6:0] opc);
    return {imm, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_j(input int off, input int rd);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'h6f};
  endfunction

  function automatic logic [31:0] ADD (int rd, int a, int b); return enc_r(7'h00, b, a, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] SUB (int rd, int a, int b); return enc_r(7'h20, b, a, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] ADDI(int rd, int a, int i); return enc_i(i, a, 3'd0, rd, 7'h13); endfunction
  function automatic logic [31:0] SLLI(int rd, int a, int s); return enc_i(s & 31, a, 3'd1, rd, 7'h13); endfunction
  function automatic logic [31:0] LUI (int rd, logic [19:0] u); return enc_u(u, rd, 7'h37); endfunction
  function automatic logic [31:0] AUIPC(int rd, logic [19:0] u); return enc_u(u, rd, 7'h17); endfunction
  function automatic logic [31:0] LW  (int rd, int a, int i); return enc_i(i, a, 3'd2, rd, 7'h03); endfunction
  function automatic logic [31:0] LB  (int rd, int a, int i); return enc_i(i, a, 3'd0, rd, 7'h03); endfunction
  function automatic logic [31:0] LBU (int rd, int a, int i); return enc_i(i, a, 3'd4, rd, 7'h03); endfunction
  function automatic logic [31:0] LH  (int rd, int a, int i); return enc_i(i, a, 3'd1, rd, 7'h03); endfunction
  function automatic logic [31:0] LHU (int rd, int a, int i); return enc_i(i, a, 3'd5, rd, 7'h03); endfunction
  function automatic logic [31:0] SW  (int v, int a, int i); return enc_s(i, v, a, 3'd2); endfunction
  function automatic logic [31:0] SH  (int v, int a, int i); return enc_s(i, v, a, 3'd1); endfunction
  function automatic logic [31:0] SB  (int v, int a, int i); return enc_s(i, v, a, 3'd0); endfunction
  function automatic logic [31:0] BEQ (int a, int b, int o); return enc_b(o, b, a, 3'd0); endfunction
  function automatic logic [31:0] BNE (int a, int b, int o); return enc_b(o, b, a, 3'd1); endfunction
  function automatic logic [31:0] BLT (int a, int b, int o); return enc_b(o, b, a, 3'd4); endfunction
  function automatic logic [31:0] BGE (int a, int b, int o); return enc_b(o, b, a, 3'd5); endfunction
  function automatic logic [31:0] BLTU(int a, int b, int o); return enc_b(o, b, a, 3'd6); endfunction
  function automatic logic [31:0] BGEU(int a, int b, int o); return enc_b(o, b, a, 3'd7); endfunction
  function automatic logic [31:0] JAL (int rd, int o); return enc_j(o, rd); endfunction
  function automatic logic [31:0] JALR(int rd, int a, int i); return enc_i(i, a, 3'd0, rd, 7'h67); endfunction

  // ---------------- reference model ----------------
  typedef struct {
    logic [31:0] pc;
    logic        reg_write;
    logic [4:0]  rd;
    logic [31:0] rd_data;
    logic        mem_write;
    logic [31:0] mem_addr;
    logic [31:0] store_data;
  } step_t;

  class rv_iss;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [7:0]  mem [logic [31:0]];

    function new(logic [31:0] reset_pc);
      pc = reset_pc;
      foreach (x[i]) x[i] = '0;
    endfunction

    function logic [7:0] rb(logic [31:0] a);
      return mem.exists(a) ? mem[a] : 8'h00;
    endfunction
    function logic [31:0] rw(logic [31:0] a);
      return {rb(a + 3), rb(a + 2), rb(a + 1), rb(a)};
    endfunction
    function void wb(logic [31:0] a, logic [7:0] d);
      mem[a] = d;
    endfunction

    function step_t step();
      step_t s;
      logic [31:0] ins, a, b, imm_i, imm_s, imm_b, imm_j, r, npc, ea;
      logic [6:0] opc;
      logic [2:0] f3;
      logic f7;
      int rd;
      ins = rw(pc);
      opc = ins[6:0]; f3 = ins[14:12]; f7 = ins[30]; rd = int'(ins[11:7]);
      a = x[ins[19:15]]; b = x[ins[24:20]];
      imm_i = {{20{ins[31]}}, ins[31:20]};
      imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      imm_b = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
      imm_j = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
      s = '{pc: pc, reg_write: 0, rd: 5'(rd), rd_data: 0, mem_write: 0, mem_addr: 0, store_data: 0};
      npc = pc + 4;
      r = 0;
      case (opc)
        7'h37: begin r = {ins[31:12], 12'b0}; s.reg_write = 1; end
        7'h17: begin r = pc + {ins[31:12], 12'b0}; s.reg_write = 1; end
        7'h6f: begin r = pc + 4; s.reg_write = 1; npc = pc + imm_j; end
        7'h67: begin r = pc + 4; s.reg_write = 1; npc = (a + imm_i) & ~32'd1; end
        7'h63: begin
          logic t;
          case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            default: t = (a >= b);
          endcase
          if (t) npc = pc + imm_b;
        end
        7'h03: begin
          ea = a + imm_i; s.reg_write = 1;
          case (f3)
            3'd0: r = {{24{rb(ea)[7]}}, rb(ea)};
            3'd4: r = {24'b0, rb(ea)};
            3'd1: r = {{16{rb(ea + 1)[7]}}, rb(ea + 1), rb(ea)};
            3'd5: r = {16'b0, rb(ea + 1), rb(ea)};
            default: r = rw(ea);
          endcase
        end
        7'h23: begin
          ea = a + imm_s;
          s.mem_write = 1; s.mem_addr = ea; s.store_data = b;
          wb(ea, b[7:0]);
          if (f3 != 3'd0) wb(ea + 1, b[15:8]);
          if (f3 == 3'd2) begin wb(ea + 2, b[23:16]); wb(ea + 3, b[31:24]); end
        end
        7'h13, 7'h33: begin
          logic [31:0] o;
          o = (opc == 7'h13) ? imm_i : b;
          s.reg_write = 1;
          case (f3)
            3'd0: r = (opc == 7'h33 && f7) ? a - o : a + o;
            3'd1: r = a << o[4:0];
            3'd2: r = {31'b0, $signed(a) < $signed(o)};
            3'd3: r = {31'b0, a < o};
            3'd4: r = a ^ o;
            3'd5: r = f7 ? $unsigned($signed(a) >>> o[4:0]) : a >> o[4:0];
            3'd6: r = a | o;
            default: r = a & o;
          endcase
        end
        default: ;
      endcase
      if (rd == 0) s.reg_write = 0;
      if (s.reg_write) x[rd] = r;
      s.rd_data = r;
      pc = npc;
      return s;
    endfunction
  endclass

  // Test program: a directed part exercising each pipeline and cache
  // mechanism, then a constrained-random section run twice. Register s0
  // holds the data base 0x8000; the random section only touches
  // 0x8000..0x87ff through it and never writes s0 or s1.
  class rv_prog;
    logic [31:0] prog [$];
    logic [31:0] end_pc;
    int          stride_iters_log2 = 11;   // strided store loop runs 2**this times
    int          random_len = 700;

    function int here();
      return prog.size() * 4;
    endfunction
    function void emit(input logic [31:0] w);
      prog.push_back(w);
    endfunction

    // random register from a pool that excludes s0 (data base) and s1
    function int rreg();
      return $urandom_range(11, 27);
    endfunction

    function void random_section(input int n);
      for (int k = 0; k < n; k++) begin
        int c = $urandom_range(0, 99);
        int rd = rreg(), a = rreg(), b = rreg();
        if (c < 35) begin
          logic [2:0] f3 = 3'($urandom);
          logic f7 = (f3 == 3'd0 || f3 == 3'd5) ? 1'($urandom) : 1'b0;
          emit(enc_r(f7 ? 7'h20 : 7'h00, b, a, f3, rd, 7'h33));
        end else if (c < 60) begin
          logic [2:0] f3 = 3'($urandom);
          int imm = $urandom_range(0, 4095) - 2048;
          if (f3 == 3'd1) imm = $urandom_range(0, 31);
          if (f3 == 3'd5) imm = $urandom_range(0, 31) | ($urandom_range(0, 1) << 10);
          emit(enc_i(imm, a, f3, rd, 7'h13));
        end else if (c < 63) begin
          emit(($urandom_range(0, 1) ? LUI(rd, 20'($urandom)) : AUIPC(rd, 20'($urandom))));
        end else if (c < 76) begin
          int w = $urandom_range(0, 4);   // lb lh lw lbu lhu
          logic [2:0] f3s [5] = '{3'd0, 3'd1, 3'd2, 3'd4, 3'd5};
          int off = $urandom_range(0, 2047);
          off = (w == 2) ? off & ~3 : (w == 1 || w == 4) ? off & ~1 : off;
          emit(enc_i(off, 8, f3s[w], rd, 7'h03));
          if ($urandom_range(0, 2) == 0) emit(ADD(rreg(), rd, rreg()));   // load-use
        end else if (c < 90) begin
          int w = $urandom_range(0, 2);
          int off = $urandom_range(0, 2047);
          off = (w == 2) ? off & ~3 : (w == 1) ? off & ~1 : off;
          emit(enc_s(off, a, 8, 3'(w)));
        end else begin
          logic [2:0] f3s [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
          int skip = $urandom_range(1, 3);
          emit(enc_b(4 * (skip + 1), b, a, f3s[$urandom_range(0, 5)]));
        end
      end
    endfunction

    function void build();
      int f, g, l1, l2, l3, lr;
      emit(JAL(0, 24));                       // 0: skip the functions
      f = here();                             // 4: function: a0 = 5 << 3
      emit(ADDI(10, 0, 5)); emit(SLLI(10, 10, 3)); emit(JALR(0, 1, 0));
      g = here();                             // 16: function reading its link at once
      emit(ADD(31, 1, 0)); emit(JALR(0, 31, 0));
      // 24: start
      emit(LUI(8, 20'h8));                    // s0 = 0x8000
      emit(ADDI(5, 0, 0)); emit(ADDI(6, 0, 64)); emit(ADDI(7, 0, 0));
      l1 = here();
      emit(SLLI(28, 5, 2)); emit(ADD(29, 8, 28));
      emit(ADD(30, 5, 5)); emit(ADD(30, 30, 5));          // forwarding from M
      emit(SW(30, 29, 0)); emit(LW(31, 29, 0));
      emit(ADD(7, 7, 31));                                 // load-use
      emit(ADDI(5, 5, 1));
      emit(BLT(5, 6, l1 - here()));
      // sub-word stores and loads
      emit(ADDI(11, 0, 12'h7a5));
      emit(LUI(12, 20'h12345)); emit(ADDI(12, 12, 12'h678));
      emit(SW(12, 8, 12'h400)); emit(SB(11, 8, 12'h401)); emit(SH(11, 8, 12'h402));
      emit(LW(13, 8, 12'h400));
      emit(LB(14, 8, 12'h401)); emit(LBU(15, 8, 12'h401)); emit(LH(16, 8, 12'h402)); emit(LHU(17, 8, 12'h402));
      emit(ADDI(18, 0, -1)); emit(SB(18, 8, 12'h403)); emit(LW(13, 8, 12'h400)); emit(LB(14, 8, 12'h403));
      emit(SH(18, 8, 12'h404)); emit(LH(16, 8, 12'h404)); emit(LHU(17, 8, 12'h404));
      // call and use the external s1
      emit(JAL(1, f - here()));
      emit(ADD(10, 10, 9));
      emit(JAL(1, g - here()));
      emit(ADD(10, 10, 31));
      // strided stores over 32 KiB at 0x10000
      emit(LUI(5, 20'h10)); emit(ADDI(6, 0, 0)); emit(ADDI(28, 0, 1)); emit(SLLI(28, 28, stride_iters_log2));
      l2 = here();
      emit(SW(6, 5, 0)); emit(ADDI(5, 5, 16)); emit(ADDI(6, 6, 1)); emit(BNE(6, 28, l2 - here()));
      // read back the first 64, long evicted from both caches
      emit(LUI(5, 20'h10)); emit(ADDI(6, 0, 0)); emit(ADDI(7, 0, 0)); emit(ADDI(28, 0, 64));
      l3 = here();
      emit(LW(29, 5, 0)); emit(ADD(7, 7, 29)); emit(ADDI(5, 5, 16)); emit(ADDI(6, 6, 1));
      emit(BLTU(6, 28, l3 - here()));
      // remaining branch kinds, both outcomes
      emit(BGE(6, 0, 8));   emit(ADDI(7, 7, 1));
      emit(BGEU(0, 6, 8));  emit(ADDI(7, 7, 2));
      emit(BEQ(6, 28, 8));  emit(ADDI(7, 7, 4));
      emit(BNE(6, 28, 8));  emit(ADDI(7, 7, 8));
      emit(BLT(28, 6, 8));  emit(ADDI(7, 7, 16));
      emit(AUIPC(30, 20'h1));
      emit(ADD(10, 10, 7));
      // constrained-random section, run twice
      emit(ADDI(5, 0, 2));
      lr = here();
      random_section(random_len);
      emit(ADDI(5, 5, -1));
      emit(BNE(5, 0, lr - here()));
      emit(ADD(10, 10, 20));
      end_pc = here();
      emit(JAL(0, 0));
    endfunction


  endclass

endpackage
