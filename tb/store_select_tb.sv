// store_select_tb: merges random bytes and halfwords into random words at
// every legal offset and compares with byte-lane replacement done here.
module store_select_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] old_word, sd, merged, exp;
  logic [1:0] off;
  mem_width_e w;
  store_select dut (.old_word, .store_data(sd), .byte_off(off), .width(w), .merged);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] by [4];
      old_word = $urandom; sd = $urandom; off = 2'($urandom);
      w = mem_width_e'($urandom_range(0, 2));
      if (w == MW_HALF) off[0] = 1'b0;
      if (w == MW_WORD) off = 2'b00;
      for (int k = 0; k < 4; k++) by[k] = old_word[8*k +: 8];
      case (w)
        MW_BYTE: by[off] = sd[7:0];
        MW_HALF: begin by[off] = sd[7:0]; by[off+1] = sd[15:8]; end
        default: for (int k = 0; k < 4; k++) by[k] = sd[8*k +: 8];
      endcase
      exp = {by[3], by[2], by[1], by[0]};
      #1;
      checks++;
      if (merged !== exp) begin failures++; $display("FAIL w=%0d off=%0d got=%h exp=%h", w, off, merged, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
