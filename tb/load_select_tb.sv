// load_select_tb: every width, offset and signedness on random words,
// against byte extraction done here.
module load_select_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] word, data, exp;
  logic [1:0] off;
  mem_width_e w;
  logic uns;
  load_select dut (.word, .byte_off(off), .width(w), .unsigned_ld(uns), .data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] by [4];
      word = $urandom; off = 2'($urandom); uns = 1'($urandom);
      w = mem_width_e'($urandom_range(0, 2));
      if (w == MW_HALF) off[0] = 1'b0;
      if (w == MW_WORD) off = 2'b00;
      for (int k = 0; k < 4; k++) by[k] = word[8*k +: 8];
      case (w)
        MW_BYTE: exp = uns ? {24'b0, by[off]} : {{24{by[off][7]}}, by[off]};
        MW_HALF: exp = uns ? {16'b0, by[off+1], by[off]} : {{16{by[off+1][7]}}, by[off+1], by[off]};
        default: exp = {by[3], by[2], by[1], by[0]};
      endcase
      #1;
      checks++;
      if (data !== exp) begin failures++; $display("FAIL w=%0d off=%0d u=%0d word=%h got=%h exp=%h", w, off, uns, word, data, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
