// main_memory: joint main memory behind the L2 cache.
// SIZE_BYTES (256 KiB) stored as 16-byte lines, with a 16-byte (128-bit)
// port to the L2. A request (blk_req_t, held until ack) is acknowledged
// LATENCY (100) cycles after it is first seen; a read returns the line with
// the ack, a write stores the line at the ack. Addresses above the capacity
// wrap. A separate load port (load_we, load_addr, load_data) writes one line
// directly, for placing a program in memory before reset is released; it
// must not be used while a request is in progress.
// Capacity, port width and the 100-cycle access time follow the source; the
// load port and the protocol are this design's own. The contents are not
// reset.
module main_memory
  import riscv_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 262144,
  parameter int unsigned LATENCY    = 100
) (
  input  logic        clk,
  input  logic        rst,
  input  blk_req_t    req,
  output blk_rsp_t    rsp,
  input  logic        load_we,
  input  logic [27:0] load_addr,   // line address
  input  block_t      load_data
);
  localparam int unsigned LINES = SIZE_BYTES / 16;
  localparam int unsigned AW    = $clog2(LINES);
  localparam int unsigned CW    = $clog2(LATENCY + 1);

  block_t        mem [LINES];
  logic          busy_q, ack_q;
  logic [CW-1:0] cnt_q;
  block_t        rdata_q;

  logic [AW-1:0] a;
  assign a = req.baddr[AW-1:0];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW-1:0]] <= load_data;
    else if (busy_q && cnt_q == '0 && req.we) mem[a] <= req.wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q <= 1'b0; ack_q <= 1'b0; cnt_q <= '0; rdata_q <= '0;
    end else begin
      ack_q <= 1'b0;
      if (!busy_q) begin
        if (req.req && !ack_q) begin
          busy_q <= 1'b1;
          cnt_q  <= CW'(LATENCY - 2);
        end
      end else if (cnt_q != '0) begin
        cnt_q <= cnt_q - 1'b1;
      end else begin
        busy_q  <= 1'b0;
        ack_q   <= 1'b1;
        rdata_q <= mem[a];
      end
    end
  end

  assign rsp.ack   = ack_q;
  assign rsp.rdata = rdata_q;
endmodule
