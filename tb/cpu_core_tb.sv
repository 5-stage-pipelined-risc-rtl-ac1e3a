// cpu_core_tb: the pipeline alone, on ideal single-cycle memories modelled
// here, running the same program as the whole-CPU test (with a shorter
// strided loop). Instruction and data ports randomly report not-ready for a
// few cycles, as caches would on a miss, to exercise the freeze. Every
// completed instruction is compared with the reference model in rv_tb_pkg.
// Also checks the 2-cycle misprediction penalty: a taken branch that the
// predictor does not yet know costs exactly two cycles more than when it
// is predicted.
module cpu_core_tb;
  import riscv_pkg::*;
  import rv_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, ext_s1_wdata, a0_out;
  logic imem_ready, dmem_req, dmem_we, dmem_ready, ext_s1_we;
  retire_t retire;
  logic [7:0] mem [logic [31:0]];
  rv_prog p;
  rv_iss iss;
  bit done = 0, stalls_on = 1;
  int n_redirect = 0, n_freeze = 0;

  cpu_core dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] rd32(input logic [31:0] a);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[8*b +: 8] = mem.exists(a + b) ? mem[a + b] : 8'h00;
    return v;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ideal memories with random not-ready cycles
  int istall = 0, dstall = 0;
  always_comb begin
    imem_rdata = rd32(imem_addr);
    dmem_rdata = rd32(dmem_addr);
    imem_ready = (istall == 0);
    dmem_ready = !dmem_req || (dstall == 0);
  end
  always @(posedge clk) begin
    if (!rst && dmem_req && dmem_we && dmem_ready && imem_ready)
      for (int b = 0; b < 4; b++) mem[dmem_addr + b] = dmem_wdata[8*b +: 8];
    istall <= (istall > 0) ? istall - 1 : (stalls_on && $urandom_range(0, 15) == 0) ? $urandom_range(1, 4) : 0;
    dstall <= (dstall > 0) ? dstall - 1 : (stalls_on && $urandom_range(0, 15) == 0) ? $urandom_range(1, 4) : 0;
    if (!rst && dut.take_redirect) n_redirect++;
    if (!rst && !(imem_ready && dmem_ready)) n_freeze++;
  end

  always @(posedge clk) if (!rst && !done && retire.valid) begin
    step_t s;
    s = iss.step();
    chk(retire.pc == s.pc, $sformatf("pc %h vs model %h", retire.pc, s.pc));
    chk(retire.reg_write == s.reg_write && (!s.reg_write || (retire.rd == s.rd && retire.rd_data == s.rd_data)),
        $sformatf("pc %h writes x%0d=%h, model x%0d=%h", s.pc, retire.rd, retire.rd_data, s.rd, s.rd_data));
    if (s.mem_write)
      chk(retire.mem_write && retire.mem_addr == s.mem_addr && retire.store_data == s.store_data,
          $sformatf("pc %h store", s.pc));
    if (s.pc == p.end_pc) done = 1;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time from reset to the first completed instruction at a given pc
  task automatic run_to(input logic [31:0] pc, output int cyc);
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!(retire.valid && retire.pc == pc));
  endtask

  initial begin
    int c1, c2;
    ext_s1_we = 0; ext_s1_wdata = 0;
    p = new();
    p.stride_iters_log2 = 7;
    p.build();
    iss = new(32'h0);
    foreach (p.prog[i]) for (int b = 0; b < 4; b++) begin
      iss.wb(32'(4 * i + b), p.prog[i][8*b +: 8]);
      mem[32'(4 * i + b)] = p.prog[i][8*b +: 8];
    end
    iss.x[9] = 32'h55;
    repeat (2) @(negedge clk);
    rst = 0;
    ext_s1_we = 1; ext_s1_wdata = 32'h55;
    @(negedge clk) ext_s1_we = 0;
    wait (done);
    repeat (5) @(posedge clk);
    chk(a0_out == iss.x[10], "a0 at the end");
    chk(n_redirect > 0 && n_freeze > 0, "redirects and freezes happened");
    $display("redirects=%0d freeze cycles=%0d", n_redirect, n_freeze);
    // misprediction penalty: tiny loop "addi; bne" without memory stalls
    stalls_on = 0;
    rst = 1;
    mem.delete();
    begin
      logic [31:0] code [4] = '{ADDI(5, 0, 3), ADDI(5, 5, -1), BNE(5, 0, -4), JAL(0, 0)};
      foreach (code[i]) for (int b = 0; b < 4; b++) mem[32'(4 * i + b)] = code[i][8*b +: 8];
    end
    repeat (3) @(negedge clk);
    rst = 0;
    // first bne: not yet in the table, taken -> mispredicted;
    // second bne: recorded weakly taken -> predicted, no penalty
    run_to(32'h8, c1);
    run_to(32'h4, c2);  // addi after first (mispredicted) bne
    begin
      int c3, c4;
      run_to(32'h8, c3);
      run_to(32'h4, c4);  // addi after second (predicted) bne
      chk(c2 == c4 + 2, $sformatf("misprediction costs 2 cycles (%0d vs %0d)", c2, c4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
