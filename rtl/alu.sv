// alu: 32-bit arithmetic logic unit of the execute stage.
// It performs every RV32I register and immediate operation (add, subtract,
// shifts, set-less-than signed and unsigned, xor, or, and) plus a pass-through
// of operand B used for LUI. Branches use it too: BEQ/BNE subtract and test
// the zero flag, BLT/BGE use SLT and BLTU/BGEU use SLTU, then test bit 0 of the
// result. Purely combinational. Which operations it covers follows the RV32I
// base set; the operation encoding is this design's own.
module alu
  import riscv_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end
  assign zero = (y == 32'b0);
endmodule
