// sign_extend: immediate generator of the decode stage.
// From instruction bits [31:7] it assembles the 32-bit immediate of the
// I, S, B, U or J format selected by the control unit, sign-extending from
// bit 31. Combinational. Formats follow the RV32I encoding; the select
// encoding (imm_src_e) is this design's own.
module sign_extend
  import riscv_pkg::*;
(
  input  logic [31:7] instr,
  input  imm_src_e    imm_src,
  output logic [31:0] imm
);
  always_comb begin
    unique case (imm_src)
      IMM_I: imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S: imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B: imm = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U: imm = {instr[31:12], 12'b0};
      IMM_J: imm = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = {{20{instr[31]}}, instr[31:20]};
    endcase
  end
endmodule
