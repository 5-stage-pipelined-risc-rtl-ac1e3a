// l1_icache: level-1 instruction cache, read only.
// SIZE_BYTES (1 KiB) of 16-byte blocks in 2 ways, so 32 sets; address bits
// [3:2] select the word, [IDX+3:4] the set, the rest is the tag. Lookup is
// combinational: a hit returns the instruction word in the same cycle
// (single-cycle hit) and ready is high. On a miss ready is low, the block
// address is latched and a read of the whole block is requested from the
// next level (blk_req_t, held until ack); the returned block is written into
// the least-recently-used way and the access hits on the following cycle.
// One LRU bit per set names the way to replace; a hit on a way points it at
// the other. Capacity, associativity, block size, LRU and the single-cycle
// hit follow the source; the request protocol and the reset (all lines
// invalid) are this design's own.
module l1_icache
  import riscv_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  output logic        ready,
  output blk_req_t    mreq,
  input  blk_rsp_t    mrsp
);
  localparam int unsigned WAYS = 2;
  localparam int unsigned SETS = SIZE_BYTES / (16 * WAYS);
  localparam int unsigned IDX  = $clog2(SETS);
  localparam int unsigned TAGW = 28 - IDX;

  logic            valid_q [WAYS][SETS];
  logic [TAGW-1:0] tag_q   [WAYS][SETS];
  block_t          data_q  [WAYS][SETS];
  logic            lru_q   [SETS];   // way to replace next

  logic [IDX-1:0]  set;
  logic [TAGW-1:0] tag;
  logic [1:0]      hit_way;
  logic            hit;
  block_t          blk;

  assign set = addr[IDX+3:4];
  assign tag = addr[31:IDX+4];

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      hit_way[w] = valid_q[w][set] && tag_q[w][set] == tag;
    hit   = |hit_way;
    blk   = hit_way[1] ? data_q[1][set] : data_q[0][set];
    rdata = blk[32*addr[3:2] +: 32];
  end

  typedef enum logic {S_IDLE, S_FILL} state_e;
  state_e      state_q;
  logic [27:0] miss_baddr_q;

  assign ready = !req || hit;

  always_comb begin
    mreq       = '0;
    mreq.req   = (state_q == S_FILL);
    mreq.baddr = miss_baddr_q;
  end

  logic [IDX-1:0] fill_set;
  logic           fill_way;
  assign fill_set = miss_baddr_q[IDX-1:0];
  assign fill_way = lru_q[fill_set];

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      miss_baddr_q <= '0;
      for (int s = 0; s < SETS; s++) begin
        lru_q[s] <= 1'b0;
        for (int w = 0; w < WAYS; w++) valid_q[w][s] <= 1'b0;
      end
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (req && hit) lru_q[set] <= ~hit_way[1];
          else if (req) begin
            miss_baddr_q <= addr[31:4];
            state_q      <= S_FILL;
          end
        end
        S_FILL: begin
          if (mrsp.ack) begin
            valid_q[fill_way][fill_set] <= 1'b1;
            tag_q  [fill_way][fill_set] <= miss_baddr_q[27:IDX];
            data_q [fill_way][fill_set] <= mrsp.rdata;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
