// blk_mem_model: behavioural next-level memory for the cache testbenches.
// Answers block requests (riscv_pkg::blk_req_t) with a one-cycle ack LATENCY
// cycles after it first sees the request. Blocks never written read as a
// fixed pattern of their address: word i of block b is init_word({b, i}).
// Counts read and write requests.
module blk_mem_model
  import riscv_pkg::*;
#(
  parameter int unsigned LATENCY = 5
) (
  input  logic     clk,
  input  logic     rst,
  input  blk_req_t req,
  output blk_rsp_t rsp,
  output int       reads,
  output int       writes
);
  block_t mem [logic [27:0]];
  int     cnt;
  logic   busy, ack;
  block_t rdata;

  function automatic logic [31:0] init_word(input logic [29:0] waddr);
    return {waddr[13:0], 2'b00, waddr[15:0]} ^ 32'h5a5a_0f0f;
  endfunction

  function automatic block_t get(input logic [27:0] b);
    block_t v;
    if (mem.exists(b)) return mem[b];
    for (int i = 0; i < 4; i++) v[32*i +: 32] = init_word({b, 2'(i)});
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 0; ack <= 0; cnt <= 0; reads <= 0; writes <= 0; rdata <= '0;
    end else begin
      ack <= 0;
      if (!busy) begin
        if (req.req && !ack) begin busy <= 1; cnt <= LATENCY - 2; end
      end else if (cnt != 0) cnt <= cnt - 1;
      else begin
        busy <= 0; ack <= 1;
        if (req.we) begin mem[req.baddr] = req.wdata; writes <= writes + 1; end
        else begin rdata <= get(req.baddr); reads <= reads + 1; end
      end
    end
  end
  assign rsp.ack = ack;
  assign rsp.rdata = rdata;
endmodule
