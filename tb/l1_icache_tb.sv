// l1_icache_tb: fetches sequential runs and random jumps over 4 KiB (four
// times the cache) and checks every word against the next-level pattern,
// the miss latency, single-cycle hits on a line just filled, and LRU
// replacement: with lines A and B in a set, touching A then filling C must
// keep A and evict B.
module l1_icache_tb;
  import riscv_pkg::*;
  localparam int LAT = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic req, ready;
  logic [31:0] addr, rdata;
  blk_req_t mreq;
  blk_rsp_t mrsp;
  int reads, writes;

  l1_icache dut (.clk, .rst, .req, .addr, .rdata, .ready, .mreq, .mrsp);
  blk_mem_model #(.LATENCY(LAT)) lower (.clk, .rst, .req(mreq), .rsp(mrsp), .reads, .writes);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s addr=%h t=%0t", what, addr, $time); end
  endtask

  task automatic fetch(input logic [31:0] a, output int cyc);
    @(negedge clk);
    req = 1; addr = a; cyc = 0;
    #1;
    while (!ready) begin @(negedge clk); cyc++; #1; end
    chk(rdata == lower.init_word(a[31:2]), "instruction word");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, r0;
    req = 0; addr = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    fetch(32'h40, cyc);  chk(cyc == LAT + 2, "miss latency");
    fetch(32'h44, cyc);  chk(cyc == 0, "single-cycle hit");
    // LRU: set of 0x40 also holds 0x240 and 0x440 (512-byte way)
    fetch(32'h240, cyc); chk(cyc > 0, "second line misses");
    fetch(32'h40, cyc);  chk(cyc == 0, "first line kept");
    fetch(32'h440, cyc); chk(cyc > 0, "third line misses");
    fetch(32'h40, cyc);  chk(cyc == 0, "recently used line kept");
    r0 = reads;
    fetch(32'h240, cyc); chk(cyc > 0 && reads == r0 + 1, "least recently used line evicted");
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      a = {20'b0, 10'($urandom), 2'b00};
      for (int k = 0; k < 6; k++) fetch(a + 32'(4 * k), cyc);
    end
    chk(writes == 0, "no writes from an instruction cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
