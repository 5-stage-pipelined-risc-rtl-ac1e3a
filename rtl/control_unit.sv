// control_unit: instruction decoder of the decode stage.
// It maps opcode, funct3 and funct7 bit 5 of an RV32I instruction to the
// control bundle (ctrl_t) that travels down the pipeline, and to the
// immediate format for the sign-extend unit. Instructions outside the
// supported set (FENCE, ECALL/EBREAK, CSR, and unknown encodings) decode to a
// no-operation: nothing is written and nothing is accessed. Combinational.
// The supported set follows the source; the signal encodings are this
// design's own.
module control_unit
  import riscv_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output imm_src_e    imm_src,
  output logic        valid_op    // 1 if the instruction is a supported RV32I one
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic       f7b5;
  alu_op_e    arith;

  assign opc  = instr[6:0];
  assign f3   = instr[14:12];
  assign f7b5 = instr[30];

  // ALU operation of an OP / OP-IMM instruction.
  always_comb begin
    unique case (f3)
      3'b000: arith = (opc == OP_REG && f7b5) ? ALU_SUB : ALU_ADD;
      3'b001: arith = ALU_SLL;
      3'b010: arith = ALU_SLT;
      3'b011: arith = ALU_SLTU;
      3'b100: arith = ALU_XOR;
      3'b101: arith = f7b5 ? ALU_SRA : ALU_SRL;
      3'b110: arith = ALU_OR;
      default: arith = ALU_AND;
    endcase
  end

  always_comb begin
    ctrl = '0;
    ctrl.alu_op     = ALU_ADD;
    ctrl.result_src = RES_ALU;
    ctrl.mem_width  = mem_width_e'(f3[1:0]);
    ctrl.mem_unsig  = f3[2];
    ctrl.br_funct3  = f3;
    imm_src  = IMM_I;
    valid_op = 1'b1;
    unique case (opc)
      OP_LUI: begin
        ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_PASSB; ctrl.alu_src_b = 1'b1; imm_src = IMM_U;
      end
      OP_AUIPC: begin
        ctrl.reg_write = 1'b1; ctrl.alu_src_a = 1'b1; ctrl.alu_src_b = 1'b1; imm_src = IMM_U;
      end
      OP_JAL: begin
        ctrl.reg_write = 1'b1; ctrl.result_src = RES_PC4; ctrl.jump = 1'b1; imm_src = IMM_J;
      end
      OP_JALR: begin
        ctrl.reg_write = 1'b1; ctrl.result_src = RES_PC4; ctrl.jalr = 1'b1;
        ctrl.alu_src_b = 1'b1; imm_src = IMM_I;
        valid_op = (f3 == 3'b000);
      end
      OP_BRANCH: begin
        ctrl.branch = 1'b1; imm_src = IMM_B;
        unique case (f3[2:1])
          2'b00:   ctrl.alu_op = ALU_SUB;   // BEQ / BNE: zero flag
          2'b10:   ctrl.alu_op = ALU_SLT;   // BLT / BGE
          2'b11:   ctrl.alu_op = ALU_SLTU;  // BLTU / BGEU
          default: begin ctrl.branch = 1'b0; valid_op = 1'b0; end
        endcase
      end
      OP_LOAD: begin
        ctrl.reg_write = 1'b1; ctrl.result_src = RES_MEM; ctrl.cache_en = 1'b1;
        ctrl.alu_src_b = 1'b1; imm_src = IMM_I;
        if (f3 == 3'b011 || f3[2:1] == 2'b11) begin ctrl = '0; valid_op = 1'b0; end
      end
      OP_STORE: begin
        ctrl.mem_write = 1'b1; ctrl.cache_en = 1'b1; ctrl.alu_src_b = 1'b1; imm_src = IMM_S;
        if (f3[2] || f3[1:0] == 2'b11) begin ctrl = '0; valid_op = 1'b0; end
      end
      OP_IMM: begin
        ctrl.reg_write = 1'b1; ctrl.alu_src_b = 1'b1; ctrl.alu_op = arith; imm_src = IMM_I;
        if (f3 == 3'b101) ctrl.alu_op = f7b5 ? ALU_SRA : ALU_SRL;
        else if (f3 == 3'b000) ctrl.alu_op = ALU_ADD;
      end
      OP_REG: begin
        ctrl.reg_write = 1'b1; ctrl.alu_op = arith;
      end
      default: begin
        ctrl = '0; valid_op = 1'b0;
      end
    endcase
  end
endmodule
