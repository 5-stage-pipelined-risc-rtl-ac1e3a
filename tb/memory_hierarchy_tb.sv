// memory_hierarchy_tb: the caches and main memory together, at default
// sizes and latencies. Main memory is first filled with a known pattern
// through the load port. Then instruction fetches (sequential runs with
// random jumps over 8 KiB) and data loads and stores (random words over
// 32 KiB, twice the L2) run at the same time, as the pipeline would issue
// them, and every returned word is compared with a flat model. Checks the
// single-cycle L1 hit and the full miss path timing: an L1 miss that also
// misses in L2 takes 1 + 10 + 100 + fill cycles, and one that hits in L2
// 1 + 10 + 1 cycles.
module memory_hierarchy_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic imem_ready, dmem_req, dmem_we, dmem_ready, load_we;
  logic [27:0] load_addr;
  block_t load_data;
  logic [31:0] model [logic [31:0]];

  memory_hierarchy dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(input logic [31:0] a);
    return (a * 32'h9e37_79b1) ^ 32'hc0de_0000;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic daccess(input logic w, input logic [31:0] a, input logic [31:0] d, output int cyc);
    @(negedge clk);
    dmem_req = 1; dmem_we = w; dmem_addr = a; dmem_wdata = d; cyc = 0;
    #1;
    while (!dmem_ready) begin @(negedge clk); cyc++; #1; end
    if (!w) chk(dmem_rdata == model[a], $sformatf("load %h", a));
    @(posedge clk);
    if (w) model[a] = d;
    #1 dmem_req = 0;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ifetch_on = 0;
  int ifetched = 0;
  // instruction side: fetch continuously while enabled
  always @(negedge clk) if (ifetch_on) begin
    #1;
    if (imem_ready) begin
      chk(imem_rdata == model[imem_addr], $sformatf("fetch %h", imem_addr));
      ifetched++;
      imem_addr <= ($urandom_range(0, 15) == 0) ? {19'b0, 11'($urandom), 2'b00} : (imem_addr + 4) & 32'h1fff;
    end
  end

  initial begin
    int cyc;
    imem_addr = 0; dmem_req = 0; dmem_we = 0; dmem_addr = 0; dmem_wdata = 0;
    load_we = 0; load_addr = 0; load_data = 0;
    // 8 KiB of code at 0, 32 KiB of data at 0x10000
    for (int l = 0; l < 512 + 2048; l++) begin
      logic [27:0] line;
      line = (l < 512) ? 28'(l) : 28'(32'h1000 + l - 512);
      @(negedge clk);
      load_we = 1; load_addr = line;
      for (int w = 0; w < 4; w++) begin
        load_data[32*w +: 32] = pattern({line, 2'(w), 2'b00});
        model[{line, 2'(w), 2'b00}] = pattern({line, 2'(w), 2'b00});
      end
    end
    @(negedge clk) load_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // timing, with the instruction side idle on its first line
    repeat (200) @(negedge clk);
    daccess(0, 32'h10000, 0, cyc);
    chk(cyc == 1 + 10 + 100 + 1 + 1, $sformatf("L1 and L2 miss (%0d cycles)", cyc));
    daccess(0, 32'h10004, 0, cyc);
    chk(cyc == 0, "L1 hit is single-cycle");
    // evict 0x10000 from the 2-way L1 by two other lines of its set
    daccess(0, 32'h10200, 0, cyc); daccess(0, 32'h10400, 0, cyc);
    daccess(0, 32'h10000, 0, cyc);
    chk(cyc == 1 + 10 + 1, $sformatf("L1 miss, L2 hit (%0d cycles)", cyc));
    ifetch_on = 1;
    for (int n = 0; n < 6000; n++) begin
      logic [31:0] a;
      a = 32'h10000 + {17'b0, 13'($urandom), 2'b00};
      daccess(($urandom_range(0, 2) == 0), a, $urandom, cyc);
    end
    ifetch_on = 0;
    // read back all data
    for (int i = 0; i < 8192; i += 7) daccess(0, 32'h10000 + 32'(4 * i), 0, cyc);
    chk(ifetched > 1000, "instruction side made progress");
    $display("fetched=%0d", ifetched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
