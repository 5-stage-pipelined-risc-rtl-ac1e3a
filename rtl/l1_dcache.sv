// l1_dcache: level-1 data cache, write-back and write-allocate.
// SIZE_BYTES (1 KiB) of 16-byte blocks in 2 ways, so 32 sets, with one LRU
// bit and a dirty bit per line. The CPU port is one 32-bit word: a read hit
// returns the word combinationally in the same cycle, a write hit updates
// the word at the clock edge and marks the line dirty; both are single-cycle
// and ready stays high. Sub-word stores are merged in the pipeline before
// they reach this port. On a miss ready is low: a dirty victim (the LRU way)
// is first written to the next level as a whole block, then the missing
// block is read and placed in that way, and the access hits on the next
// cycle. Requests to the next level use blk_req_t, held until the one-cycle
// ack. Capacity, associativity, block size, LRU and single-cycle hits follow
// the source; write-back with write-allocate, the protocol and the reset (all
// lines invalid) are this design's own.
module l1_dcache
  import riscv_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,     // load or store in the memory stage
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
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
  logic            dirty_q [WAYS][SETS];
  logic [TAGW-1:0] tag_q   [WAYS][SETS];
  block_t          data_q  [WAYS][SETS];
  logic            lru_q   [SETS];

  logic [IDX-1:0]  set;
  logic [TAGW-1:0] tag;
  logic [1:0]      hit_way;
  logic            hit, hway;
  block_t          blk;

  assign set = addr[IDX+3:4];
  assign tag = addr[31:IDX+4];

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      hit_way[w] = valid_q[w][set] && tag_q[w][set] == tag;
    hit   = |hit_way;
    hway  = hit_way[1];
    blk   = data_q[hway][set];
    rdata = blk[32*addr[3:2] +: 32];
  end

  typedef enum logic [1:0] {S_IDLE, S_WB, S_FILL} state_e;
  state_e      state_q;
  logic [27:0] miss_baddr_q;
  logic        vway_q;

  assign ready = !req || hit;

  logic [IDX-1:0] mset;
  logic           vway;
  assign mset = miss_baddr_q[IDX-1:0];
  assign vway = lru_q[set];

  always_comb begin
    mreq = '0;
    unique case (state_q)
      S_WB: begin
        mreq.req   = 1'b1;
        mreq.we    = 1'b1;
        mreq.baddr = {tag_q[vway_q][mset], mset};
        mreq.wdata = data_q[vway_q][mset];
      end
      S_FILL: begin
        mreq.req   = 1'b1;
        mreq.baddr = miss_baddr_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      miss_baddr_q <= '0;
      vway_q <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        lru_q[s] <= 1'b0;
        for (int w = 0; w < WAYS; w++) begin
          valid_q[w][s] <= 1'b0;
          dirty_q[w][s] <= 1'b0;
        end
      end
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (req && hit) begin
            lru_q[set] <= ~hway;
            if (we) begin
              data_q[hway][set][32*addr[3:2] +: 32] <= wdata;
              dirty_q[hway][set] <= 1'b1;
            end
          end else if (req) begin
            miss_baddr_q <= addr[31:4];
            vway_q       <= vway;
            state_q      <= (valid_q[vway][set] && dirty_q[vway][set]) ? S_WB : S_FILL;
          end
        end
        S_WB: if (mrsp.ack) state_q <= S_FILL;
        S_FILL: begin
          if (mrsp.ack) begin
            valid_q[vway_q][mset] <= 1'b1;
            dirty_q[vway_q][mset] <= 1'b0;
            tag_q  [vway_q][mset] <= miss_baddr_q[27:IDX];
            data_q [vway_q][mset] <= mrsp.rdata;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
