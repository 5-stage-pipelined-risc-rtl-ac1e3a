// control_unit_tb: decodes every RV32I instruction (with random register
// and immediate fields) and several unsupported encodings, and compares the
// control bundle with a table written out here per mnemonic.
module control_unit_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  ctrl_t ctrl;
  imm_src_e imm_src;
  logic valid_op;
  control_unit dut (.instr, .ctrl, .imm_src, .valid_op);

  typedef struct {
    string name; logic [6:0] opc; logic [2:0] f3; logic f7b5;
    logic rw; result_src_e rs; logic mw; logic ce; logic j; logic jr; logic br;
    alu_op_e op; logic sb; logic sa; imm_src_e im;
  } row_t;

  row_t rows [37] = '{
    '{"lui",   7'h37, 3'd0, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_PASSB, 1, 0, IMM_U},
    '{"auipc", 7'h17, 3'd0, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_ADD, 1, 1, IMM_U},
    '{"jal",   7'h6f, 3'd0, 0, 1, RES_PC4, 0, 0, 1, 0, 0, ALU_ADD, 0, 0, IMM_J},
    '{"jalr",  7'h67, 3'd0, 0, 1, RES_PC4, 0, 0, 0, 1, 0, ALU_ADD, 1, 0, IMM_I},
    '{"beq",   7'h63, 3'd0, 0, 0, RES_ALU, 0, 0, 0, 0, 1, ALU_SUB, 0, 0, IMM_B},
    '{"bne",   7'h63, 3'd1, 0, 0, RES_ALU, 0, 0, 0, 0, 1, ALU_SUB, 0, 0, IMM_B},
    '{"blt",   7'h63, 3'd4, 0, 0, RES_ALU, 0, 0, 0, 0, 1, ALU_SLT, 0, 0, IMM_B},
    '{"bge",   7'h63, 3'd5, 0, 0, RES_ALU, 0, 0, 0, 0, 1, ALU_SLT, 0, 0, IMM_B},
    '{"bltu",  7'h63, 3'd6, 0, 0, RES_ALU, 0, 0, 0, 0, 1, ALU_SLTU, 0, 0, IMM_B},
    '{"bgeu",  7'h63, 3'd7, 0, 0, RES_ALU, 0, 0, 0, 0, 1, ALU_SLTU, 0, 0, IMM_B},
    '{"lb",    7'h03, 3'd0, 0, 1, RES_MEM, 0, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_I},
    '{"lh",    7'h03, 3'd1, 0, 1, RES_MEM, 0, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_I},
    '{"lw",    7'h03, 3'd2, 0, 1, RES_MEM, 0, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_I},
    '{"lbu",   7'h03, 3'd4, 0, 1, RES_MEM, 0, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_I},
    '{"lhu",   7'h03, 3'd5, 0, 1, RES_MEM, 0, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_I},
    '{"sb",    7'h23, 3'd0, 0, 0, RES_ALU, 1, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_S},
    '{"sh",    7'h23, 3'd1, 0, 0, RES_ALU, 1, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_S},
    '{"sw",    7'h23, 3'd2, 0, 0, RES_ALU, 1, 1, 0, 0, 0, ALU_ADD, 1, 0, IMM_S},
    '{"addi",  7'h13, 3'd0, 1, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_ADD, 1, 0, IMM_I},
    '{"slti",  7'h13, 3'd2, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SLT, 1, 0, IMM_I},
    '{"sltiu", 7'h13, 3'd3, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SLTU, 1, 0, IMM_I},
    '{"xori",  7'h13, 3'd4, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_XOR, 1, 0, IMM_I},
    '{"ori",   7'h13, 3'd6, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_OR, 1, 0, IMM_I},
    '{"andi",  7'h13, 3'd7, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_AND, 1, 0, IMM_I},
    '{"slli",  7'h13, 3'd1, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SLL, 1, 0, IMM_I},
    '{"srli",  7'h13, 3'd5, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SRL, 1, 0, IMM_I},
    '{"srai",  7'h13, 3'd5, 1, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SRA, 1, 0, IMM_I},
    '{"add",   7'h33, 3'd0, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_ADD, 0, 0, IMM_I},
    '{"sub",   7'h33, 3'd0, 1, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SUB, 0, 0, IMM_I},
    '{"sll",   7'h33, 3'd1, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SLL, 0, 0, IMM_I},
    '{"slt",   7'h33, 3'd2, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SLT, 0, 0, IMM_I},
    '{"sltu",  7'h33, 3'd3, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SLTU, 0, 0, IMM_I},
    '{"xor",   7'h33, 3'd4, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_XOR, 0, 0, IMM_I},
    '{"srl",   7'h33, 3'd5, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SRL, 0, 0, IMM_I},
    '{"sra",   7'h33, 3'd5, 1, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_SRA, 0, 0, IMM_I},
    '{"or",    7'h33, 3'd6, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_OR, 0, 0, IMM_I},
    '{"and",   7'h33, 3'd7, 0, 1, RES_ALU, 0, 0, 0, 0, 0, ALU_AND, 0, 0, IMM_I}
  };

  logic [31:0] bad [5] = '{32'h0ff0000f, 32'h00000073, 32'h30029073, 32'h0000b003, 32'h00000000};

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s instr=%h", what, instr); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      foreach (rows[i]) begin
        instr = $urandom;
        instr[6:0] = rows[i].opc; instr[14:12] = rows[i].f3; instr[30] = rows[i].f7b5;
        if (rows[i].opc == 7'h33 || rows[i].f3 == 3'd1 || rows[i].f3 == 3'd5 && rows[i].opc == 7'h13) begin
          instr[31] = 1'b0; instr[29:25] = 5'b0;
        end
        #1;
        chk(valid_op, {rows[i].name, " valid"});
        chk(ctrl.reg_write == rows[i].rw, {rows[i].name, " reg_write"});
        chk(ctrl.mem_write == rows[i].mw && ctrl.cache_en == rows[i].ce, {rows[i].name, " mem"});
        chk(ctrl.jump == rows[i].j && ctrl.jalr == rows[i].jr && ctrl.branch == rows[i].br, {rows[i].name, " flow"});
        chk(ctrl.alu_src_b == rows[i].sb && ctrl.alu_src_a == rows[i].sa, {rows[i].name, " alu_src"});
        if (rows[i].rw) chk(ctrl.result_src == rows[i].rs, {rows[i].name, " result_src"});
        if (rows[i].br || rows[i].rw && rows[i].rs == RES_ALU)
          chk(ctrl.alu_op == rows[i].op, {rows[i].name, " alu_op"});
        if (rows[i].opc != 7'h33) chk(imm_src == rows[i].im, {rows[i].name, " imm_src"});
        if (rows[i].ce) chk(ctrl.mem_width == mem_width_e'(rows[i].f3[1:0]) && ctrl.mem_unsig == rows[i].f3[2],
                            {rows[i].name, " width"});
        if (rows[i].br) chk(ctrl.br_funct3 == rows[i].f3, {rows[i].name, " funct3"});
      end
    end
    // unsupported: FENCE, ECALL, CSRRW, a load with funct3 3, opcode 0
    foreach (bad[k]) begin
      instr = bad[k];
      #1;
      chk(!valid_op && !ctrl.reg_write && !ctrl.mem_write && !ctrl.cache_en && !ctrl.jump && !ctrl.jalr && !ctrl.branch,
          "unsupported is a no-op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
