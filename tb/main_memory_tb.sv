// main_memory_tb: writes lines through the load port and the request port,
// reads them back, and checks the 100-cycle latency from request to ack and
// that addresses wrap at the 256 KiB capacity.
module main_memory_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  blk_req_t req;
  blk_rsp_t rsp;
  logic load_we;
  logic [27:0] load_addr;
  block_t load_data;
  block_t model [logic [13:0]];

  main_memory dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic access(input logic w, input logic [27:0] b, input block_t d);
    int cyc;
    repeat (2) @(negedge clk);   // leave the port idle for a cycle first
    req.req = 1; req.we = w; req.baddr = b; req.wdata = d; cyc = 1;
    @(posedge clk); #1;
    while (!rsp.ack) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 100, $sformatf("100-cycle access (%0d)", cyc));
    if (w) model[b[13:0]] = d;
    else chk(rsp.rdata == model[b[13:0]], "read data");
    req.req = 0;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 28'(i * 200); load_data = {$urandom, $urandom, $urandom, $urandom};
      model[14'(i * 200)] = load_data;
    end
    @(negedge clk) load_we = 0;
    rst = 0;
    for (int i = 0; i < 64; i++) access(0, 28'(i * 200), '0);
    for (int n = 0; n < 200; n++) begin
      logic [27:0] b;
      b = 28'(64 * 200 + $urandom_range(0, 99));
      if (!model.exists(b[13:0]) || $urandom_range(0, 1)) access(1, b, {$urandom, $urandom, $urandom, $urandom});
      else access(0, b, '0);
    end
    // wrap: line 16384 is line 0
    access(1, 28'd16384, {4{32'h1234_5678}});
    access(0, 28'd0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
