// l2_cache: joint level-2 cache shared by the instruction and data L1s.
// SIZE_BYTES (16 KiB) of 16-byte blocks in 4 ways, so 256 sets, write-back
// with a dirty bit per line and tree pseudo-LRU replacement (3 bits per set:
// the root picks a pair of ways, one bit per pair picks the way).
// It serves one L1 request at a time. When both L1s are waiting it takes the
// one it did not serve last, so the two alternate. A request is acknowledged
// LATENCY (10) cycles after it is first seen when it hits. On a miss the
// victim (an invalid way if there is one, else the pseudo-LRU way) is first
// written to main memory if dirty; a read miss then fetches the block from
// main memory, while a write miss simply takes the written block, since L1s
// always write whole blocks. Both sides use blk_req_t/blk_rsp_t: the
// requester holds req until a one-cycle ack.
// Capacity, associativity, block size, pseudo-LRU, the 10-cycle access time
// and alternating between the two L1s follow the source; write-back, the
// tree form of pseudo-LRU, write-allocate without fetch and the protocol are
// this design's own. All lines reset invalid.
module l2_cache
  import riscv_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned LATENCY    = 10
) (
  input  logic     clk,
  input  logic     rst,
  input  blk_req_t i_req,   // from the instruction L1
  output blk_rsp_t i_rsp,
  input  blk_req_t d_req,   // from the data L1
  output blk_rsp_t d_rsp,
  output blk_req_t m_req,   // to main memory
  input  blk_rsp_t m_rsp
);
  localparam int unsigned WAYS = 4;
  localparam int unsigned SETS = SIZE_BYTES / (16 * WAYS);
  localparam int unsigned IDX  = $clog2(SETS);
  localparam int unsigned TAGW = 28 - IDX;
  localparam int unsigned CW   = $clog2(LATENCY + 1);

  logic            valid_q [WAYS][SETS];
  logic            dirty_q [WAYS][SETS];
  logic [TAGW-1:0] tag_q   [WAYS][SETS];
  block_t          data_q  [WAYS][SETS];
  logic [2:0]      plru_q  [SETS];

  typedef enum logic [2:0] {S_IDLE, S_ACCESS, S_MEM_WB, S_MEM_RD, S_RESP} state_e;
  state_e          state_q;
  logic            port_q;      // 0: instruction L1, 1: data L1
  logic            last_q;      // port served last
  logic            we_q;
  logic [27:0]     baddr_q;
  block_t          wdata_q;
  block_t          resp_q;
  logic [CW-1:0]   cnt_q;
  logic [1:0]      vway_q;

  logic [IDX-1:0]  set;
  logic [TAGW-1:0] tag;
  logic [3:0]      hit_vec;
  logic            hit;
  logic [1:0]      hway, vway;
  logic            pick;

  assign set = baddr_q[IDX-1:0];
  assign tag = baddr_q[27:IDX];

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      hit_vec[w] = valid_q[w][set] && tag_q[w][set] == tag;
    hit  = |hit_vec;
    hway = hit_vec[3] ? 2'd3 : hit_vec[2] ? 2'd2 : hit_vec[1] ? 2'd1 : 2'd0;
    // victim: first invalid way, else follow the pseudo-LRU tree
    if      (!valid_q[0][set]) vway = 2'd0;
    else if (!valid_q[1][set]) vway = 2'd1;
    else if (!valid_q[2][set]) vway = 2'd2;
    else if (!valid_q[3][set]) vway = 2'd3;
    else if (!plru_q[set][0])  vway = {1'b0, plru_q[set][1]};
    else                       vway = {1'b1, plru_q[set][2]};
    // arbitration: alternate when both are waiting
    if (i_req.req && d_req.req) pick = ~last_q;
    else                        pick = d_req.req;
  end

  // pseudo-LRU bits after an access to way w: point away from it
  function automatic logic [2:0] plru_touch(input logic [2:0] p, input logic [1:0] w);
    logic [2:0] n;
    n = p;
    n[0] = ~w[1];
    if (w[1]) n[2] = ~w[0];
    else      n[1] = ~w[0];
    return n;
  endfunction

  always_comb begin
    i_rsp = '0; d_rsp = '0;
    i_rsp.rdata = resp_q; d_rsp.rdata = resp_q;
    i_rsp.ack = (state_q == S_RESP) && !port_q;
    d_rsp.ack = (state_q == S_RESP) &&  port_q;
    m_req = '0;
    if (state_q == S_MEM_WB) begin
      m_req.req   = 1'b1;
      m_req.we    = 1'b1;
      m_req.baddr = {tag_q[vway_q][set], set};
      m_req.wdata = data_q[vway_q][set];
    end else if (state_q == S_MEM_RD) begin
      m_req.req   = 1'b1;
      m_req.baddr = baddr_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      port_q <= 1'b0; last_q <= 1'b1; we_q <= 1'b0;
      baddr_q <= '0; wdata_q <= '0; resp_q <= '0; cnt_q <= '0; vway_q <= '0;
      for (int s = 0; s < SETS; s++) begin
        plru_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          valid_q[w][s] <= 1'b0;
          dirty_q[w][s] <= 1'b0;
        end
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (i_req.req || d_req.req) begin
          port_q  <= pick;
          we_q    <= pick ? d_req.we    : i_req.we;
          baddr_q <= pick ? d_req.baddr : i_req.baddr;
          wdata_q <= pick ? d_req.wdata : i_req.wdata;
          cnt_q   <= CW'(LATENCY - 2);
          state_q <= S_ACCESS;
        end
        S_ACCESS: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else if (hit) begin
            plru_q[set] <= plru_touch(plru_q[set], hway);
            if (we_q) begin
              data_q[hway][set]  <= wdata_q;
              dirty_q[hway][set] <= 1'b1;
            end
            resp_q  <= data_q[hway][set];
            state_q <= S_RESP;
          end else begin
            vway_q <= vway;
            if (valid_q[vway][set] && dirty_q[vway][set]) state_q <= S_MEM_WB;
            else if (we_q) begin
              valid_q[vway][set] <= 1'b1;
              dirty_q[vway][set] <= 1'b1;
              tag_q  [vway][set] <= tag;
              data_q [vway][set] <= wdata_q;
              plru_q[set] <= plru_touch(plru_q[set], vway);
              state_q <= S_RESP;
            end else state_q <= S_MEM_RD;
          end
        end
        S_MEM_WB: if (m_rsp.ack) begin
          if (we_q) begin
            valid_q[vway_q][set] <= 1'b1;
            dirty_q[vway_q][set] <= 1'b1;
            tag_q  [vway_q][set] <= tag;
            data_q [vway_q][set] <= wdata_q;
            plru_q[set] <= plru_touch(plru_q[set], vway_q);
            state_q <= S_RESP;
          end else state_q <= S_MEM_RD;
        end
        S_MEM_RD: if (m_rsp.ack) begin
          valid_q[vway_q][set] <= 1'b1;
          dirty_q[vway_q][set] <= 1'b0;
          tag_q  [vway_q][set] <= tag;
          data_q [vway_q][set] <= m_rsp.rdata;
          plru_q[set] <= plru_touch(plru_q[set], vway_q);
          resp_q  <= m_rsp.rdata;
          state_q <= S_RESP;
        end
        S_RESP: begin
          last_q  <= port_q;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
