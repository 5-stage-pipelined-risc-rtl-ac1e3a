// alu_tb: checks every ALU operation on random and corner operands against
// a reference computed here, and the zero flag.
module alu_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [31:0] a, b, y, exp;
  logic zero;
  alu dut (.op, .a, .b, .y, .zero);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] r;
    int sh;
    sh = int'(z[4:0]);
    case (o)
      ALU_ADD: r = x + z;
      ALU_SUB: r = x + ~z + 1;
      ALU_SLL: begin r = x; repeat (sh) r = {r[30:0], 1'b0}; end
      ALU_SLT: r = (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, x < z};
      ALU_SLTU: r = {31'b0, x < z};
      ALU_XOR: r = x ^ z;
      ALU_SRL: begin r = x; repeat (sh) r = {1'b0, r[31:1]}; end
      ALU_SRA: begin r = x; repeat (sh) r = {r[31], r[31:1]}; end
      ALU_OR:  r = x | z;
      ALU_AND: r = x & z;
      ALU_PASSB: r = z;
      default: r = 'x;
    endcase
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h1f};
    for (int o = 0; o <= 10; o++) begin
      for (int i = 0; i < 236; i++) begin
        op = alu_op_e'(o);
        if (i < 36) begin a = corners[i % 6]; b = corners[i / 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        exp = ref_alu(op, a, b);
        checks++;
        if (y !== exp || zero !== (exp == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
