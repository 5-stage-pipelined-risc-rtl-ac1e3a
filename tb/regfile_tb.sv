// regfile_tb: random writes and reads of the register file against a model
// array; checks x0, the same-cycle write bypass, the external s1 write port
// and the a0 output.
module regfile_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [4:0] ra1, ra2, wa3;
  logic [31:0] rd1, rd2, wd3, ext_wdata, a0_out;
  logic we3, ext_we;
  logic [31:0] model [32];
  regfile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we3 = 0; ext_we = 0; wa3 = 0; wd3 = 0; ext_wdata = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we3 = $urandom_range(0, 1); wa3 = 5'($urandom); wd3 = $urandom;
      ext_we = ($urandom_range(0, 7) == 0); ext_wdata = $urandom;
      ra1 = 5'($urandom); ra2 = (n % 4 == 0) ? wa3 : 5'($urandom);
      #1;
      // bypass: a register being written reads the new value
      chk(rd1, ra1 == 0 ? 0 : (we3 && wa3 == ra1) ? wd3 : model[ra1], "rd1");
      chk(rd2, ra2 == 0 ? 0 : (we3 && wa3 == ra2) ? wd3 : model[ra2], "rd2");
      chk(a0_out, model[10], "a0");
      @(posedge clk);
      if (ext_we) model[9] = ext_wdata;
      if (we3 && wa3 != 0) model[wa3] = wd3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
