// l1_dcache_tb: random word loads and stores over 4 KiB (four times the
// cache) against a flat model memory, so lines are evicted and dirty lines
// written back. Checks every load value, that a repeated access to a line
// just used is a single-cycle hit, the refill latency of a clean miss
// (request seen, LATENCY cycles to the block, one to fill: LATENCY+2 stall cycles), that dirty
// evictions reach the next level, and finally reads every word back.
module l1_dcache_tb;
  import riscv_pkg::*;
  localparam int LAT = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic req, we, ready;
  logic [31:0] addr, wdata, rdata;
  blk_req_t mreq;
  blk_rsp_t mrsp;
  int reads, writes;
  logic [31:0] model [1024];

  l1_dcache dut (.clk, .rst, .req, .we, .addr, .wdata, .rdata, .ready, .mreq, .mrsp);
  blk_mem_model #(.LATENCY(LAT)) lower (.clk, .rst, .req(mreq), .rsp(mrsp), .reads, .writes);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s addr=%h t=%0t", what, addr, $time); end
  endtask

  // one access; returns the number of cycles until ready
  task automatic access(input logic w, input logic [31:0] a, input logic [31:0] d, output int cyc);
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d; cyc = 0;
    #1;
    while (!ready) begin @(negedge clk); cyc++; #1; end
    if (!w) chk(rdata == model[a[11:2]], "load value");
    @(posedge clk);
    if (w) model[a[11:2]] = d;
    #1 req = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    req = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) model[i] = lower.init_word(30'(i));
    repeat (2) @(posedge clk);
    rst = 0;
    // clean miss, then hits in the same line
    access(0, 32'h100, 0, cyc);
    chk(cyc == LAT + 2, "clean miss latency");
    access(0, 32'h104, 0, cyc);
    chk(cyc == 0, "single-cycle hit");
    access(1, 32'h108, 32'hdead_beef, cyc);
    chk(cyc == 0, "single-cycle store hit");
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] a;
      a = {20'b0, 10'($urandom), 2'b00};
      access(($urandom_range(0, 2) == 0), a, $urandom, cyc);
      access(0, a ^ 32'h4, 0, cyc);   // same line again
      chk(cyc == 0, "hit after access to same line");
    end
    for (int i = 0; i < 1024; i++) access(0, 32'(i * 4), 0, cyc);
    chk(writes > 0, "dirty lines written back");
    $display("reads=%0d writes=%0d", reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
