// l2_cache_tb: both L1 ports drive random block traffic at once, the
// instruction port reads from one 32 KiB region and the data port reads and
// writes another 64 KiB region, both larger than the cache, so that lines
// are evicted and dirty lines written to the memory model. Checks every
// returned block, the 10-cycle hit latency, that misses go to memory, that
// two waiting ports are served alternately, and that a pseudo-LRU set keeps
// a line touched more recently than the victim.
module l2_cache_tb;
  import riscv_pkg::*;
  localparam int LAT = 10;
  localparam int MLAT = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  blk_req_t i_req, d_req, m_req;
  blk_rsp_t i_rsp, d_rsp, m_rsp;
  int reads, writes;
  block_t dmodel [logic [27:0]];

  l2_cache dut (.*);
  blk_mem_model #(.LATENCY(MLAT)) lower (.clk, .rst, .req(m_req), .rsp(m_rsp), .reads, .writes);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic block_t init_blk(input logic [27:0] b);
    block_t v;
    for (int i = 0; i < 4; i++) v[32*i +: 32] = lower.init_word({b, 2'(i)});
    return v;
  endfunction

  task automatic d_access(input logic w, input logic [27:0] b, input block_t data, output int cyc);
    repeat (2) @(negedge clk);   // leave the port idle for a cycle first
    d_req.req = 1; d_req.we = w; d_req.baddr = b; d_req.wdata = data; cyc = 1;
    @(posedge clk); #1;
    while (!d_rsp.ack) begin @(posedge clk); #1; cyc++; end
    if (!w) chk(d_rsp.rdata == (dmodel.exists(b) ? dmodel[b] : init_blk(b)), "data port block");
    else dmodel[b] = data;
    d_req.req = 0;
  endtask

  task automatic i_access(input logic [27:0] b, output int cyc);
    repeat (2) @(negedge clk);
    i_req.req = 1; i_req.we = 0; i_req.baddr = b; i_req.wdata = '0; cyc = 1;
    @(posedge clk); #1;
    while (!i_rsp.ack) begin @(posedge clk); #1; cyc++; end
    chk(i_rsp.rdata == init_blk(b), "instruction port block");
    i_req.req = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grant order while both ports wait
  int alt_pairs = 0, alt_bad = 0;
  logic last_port, have_last;
  always @(posedge clk) if (!rst) begin
    if (dut.state_q == dut.S_IDLE && i_req.req && d_req.req) begin
      if (have_last && dut.pick == last_port) alt_bad++;
      alt_pairs++;
    end
    if (dut.state_q == dut.S_IDLE && (i_req.req || d_req.req)) begin
      last_port <= dut.pick; have_last <= 1;
    end
  end

  initial begin
    int cyc, r0;
    block_t blk;
    i_req = '0; d_req = '0; have_last = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // read miss then hit: hit answers LAT cycles after the request
    d_access(0, 28'h100, '0, cyc);
    chk(cyc > LAT + MLAT, "miss goes to memory");
    d_access(0, 28'h100, '0, cyc);
    chk(cyc == LAT, $sformatf("10-cycle hit (%0d)", cyc));
    // pseudo-LRU: fill set 0x10 with 4 lines, touch line 0, add a fifth: line 0 stays
    for (int k = 0; k < 4; k++) d_access(0, 28'(32'h10 + 256 * k), '0, cyc);
    d_access(0, 28'h10, '0, cyc);
    d_access(0, 28'(32'h10 + 256 * 4), '0, cyc);
    r0 = reads;
    d_access(0, 28'h10, '0, cyc);
    chk(cyc == LAT && reads == r0, "recently used line kept");
    fork
      for (int n = 0; n < 1500; n++) begin
        int c;
        i_access(28'($urandom_range(0, 2047)), c);
      end
      for (int n = 0; n < 1500; n++) begin
        int c;
        logic [27:0] b;
        b = 28'(4096 + $urandom_range(0, 4095));
        blk = {$urandom, $urandom, $urandom, $urandom};
        d_access(($urandom_range(0, 1) == 0), b, blk, c);
      end
    join
    // read everything the data port wrote
    foreach (dmodel[b]) d_access(0, b, '0, cyc);
    chk(writes > 0, "dirty lines written to memory");
    chk(alt_pairs > 100 && alt_bad == 0, "ports served alternately");
    $display("mem reads=%0d writes=%0d contended=%0d", reads, writes, alt_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
