// sign_extend_tb: builds random instructions and checks each immediate
// format against immediates scattered into the instruction bits here.
module sign_extend_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] ins, imm, exp;
  imm_src_e src;
  sign_extend dut (.instr(ins[31:7]), .imm_src(src), .imm);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] v;
      v = $urandom;
      ins = $urandom;
      src = imm_src_e'(n % 5);
      case (src)
        IMM_I: begin exp = {{20{v[11]}}, v[11:0]}; ins[31:20] = v[11:0]; end
        IMM_S: begin exp = {{20{v[11]}}, v[11:0]}; ins[31:25] = v[11:5]; ins[11:7] = v[4:0]; end
        IMM_B: begin exp = {{19{v[12]}}, v[12:1], 1'b0};
                     ins[31] = v[12]; ins[30:25] = v[10:5]; ins[11:8] = v[4:1]; ins[7] = v[11]; end
        IMM_U: begin exp = {v[31:12], 12'b0}; ins[31:12] = v[31:12]; end
        default: begin exp = {{11{v[20]}}, v[20:1], 1'b0};
                     ins[31] = v[20]; ins[30:21] = v[10:1]; ins[20] = v[11]; ins[19:12] = v[19:12]; end
      endcase
      #1;
      checks++;
      if (imm !== exp) begin failures++; $display("FAIL fmt=%0d ins=%h imm=%h exp=%h", src, ins, imm, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
