// riscv_top: the complete CPU, a 5-stage pipelined RV32I core with a 16-entry
// branch predictor, split 1 KiB L1 caches, a joint 16 KiB L2 cache and
// 256 KiB of main memory.
// After reset the core fetches from RESET_PC. Before releasing reset, a
// program and its data are written into main memory one 16-byte line at a
// time through load_we/load_addr/load_data. The register file's peripheral
// ports are brought out: ext_s1_we/ext_s1_wdata write register s1 and a0_out
// shows register a0, which is how an external board feeds inputs to a
// program and shows its output. retire reports every completed instruction.
// The composition follows the source; the load port and retire report are
// this design's own.
module riscv_top
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC    = 32'h0000_0000,
  parameter int unsigned BHT_ENTRIES = 16,
  parameter int unsigned L1I_BYTES   = 1024,
  parameter int unsigned L1D_BYTES   = 1024,
  parameter int unsigned L2_BYTES    = 16384,
  parameter int unsigned L2_LATENCY  = 10,
  parameter int unsigned MEM_BYTES   = 262144,
  parameter int unsigned MEM_LATENCY = 100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [27:0] load_addr,
  input  block_t      load_data,
  input  logic        ext_s1_we,
  input  logic [31:0] ext_s1_wdata,
  output logic [31:0] a0_out,
  output retire_t     retire
);
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        imem_ready, dmem_req, dmem_we, dmem_ready;

  cpu_core #(.RESET_PC(RESET_PC), .BHT_ENTRIES(BHT_ENTRIES)) u_core (
    .clk, .rst,
    .imem_addr, .imem_rdata, .imem_ready,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata, .dmem_ready,
    .ext_s1_we, .ext_s1_wdata, .a0_out, .retire
  );

  memory_hierarchy #(
    .L1I_BYTES(L1I_BYTES), .L1D_BYTES(L1D_BYTES), .L2_BYTES(L2_BYTES),
    .L2_LATENCY(L2_LATENCY), .MEM_BYTES(MEM_BYTES), .MEM_LATENCY(MEM_LATENCY)
  ) u_memsys (
    .clk, .rst,
    .imem_addr, .imem_rdata, .imem_ready,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata, .dmem_ready,
    .load_we, .load_addr, .load_data
  );
endmodule
