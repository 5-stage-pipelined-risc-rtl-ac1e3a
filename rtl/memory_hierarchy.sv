// memory_hierarchy: the three-level memory system of the CPU.
// Separate 1 KiB 2-way L1 instruction and data caches with 32-bit CPU ports
// share a 16 KiB 4-way L2 cache over 128-bit block ports; the L2 fills from
// a 256 KiB main memory over a 128-bit port. Instructions and data live in
// the same main memory (one address space). L1 hits take one cycle, an L2
// hit answers 10 cycles after the L1 asks, main memory 100 cycles after the
// L2 asks. The instruction cache is always asked for the word at imem_addr.
// The arrangement and all sizes and latencies follow the source; the
// load port into main memory, used to place a program before reset ends, is
// this design's own. Cache coherence between the two L1s is not kept: code
// must not be modified by stores while it may be cached.
module memory_hierarchy
  import riscv_pkg::*;
#(
  parameter int unsigned L1I_BYTES   = 1024,
  parameter int unsigned L1D_BYTES   = 1024,
  parameter int unsigned L2_BYTES    = 16384,
  parameter int unsigned L2_LATENCY  = 10,
  parameter int unsigned MEM_BYTES   = 262144,
  parameter int unsigned MEM_LATENCY = 100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] imem_addr,
  output logic [31:0] imem_rdata,
  output logic        imem_ready,
  input  logic        dmem_req,
  input  logic        dmem_we,
  input  logic [31:0] dmem_addr,
  input  logic [31:0] dmem_wdata,
  output logic [31:0] dmem_rdata,
  output logic        dmem_ready,
  input  logic        load_we,
  input  logic [27:0] load_addr,
  input  block_t      load_data
);
  blk_req_t i_req, d_req, m_req;
  blk_rsp_t i_rsp, d_rsp, m_rsp;

  l1_icache #(.SIZE_BYTES(L1I_BYTES)) u_l1i (
    .clk, .rst, .req(1'b1), .addr(imem_addr), .rdata(imem_rdata), .ready(imem_ready),
    .mreq(i_req), .mrsp(i_rsp)
  );

  l1_dcache #(.SIZE_BYTES(L1D_BYTES)) u_l1d (
    .clk, .rst, .req(dmem_req), .we(dmem_we), .addr(dmem_addr), .wdata(dmem_wdata),
    .rdata(dmem_rdata), .ready(dmem_ready), .mreq(d_req), .mrsp(d_rsp)
  );

  l2_cache #(.SIZE_BYTES(L2_BYTES), .LATENCY(L2_LATENCY)) u_l2 (
    .clk, .rst, .i_req, .i_rsp, .d_req, .d_rsp, .m_req, .m_rsp
  );

  main_memory #(.SIZE_BYTES(MEM_BYTES), .LATENCY(MEM_LATENCY)) u_mem (
    .clk, .rst, .req(m_req), .rsp(m_rsp), .load_we, .load_addr, .load_data
  );
endmodule
