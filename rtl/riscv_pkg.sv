// riscv_pkg: types and constants shared by the RV32I pipeline and its caches.
// It holds the opcode values of the base RV32I instruction set, the ALU
// operation codes, the immediate-format and result-source selects used by the
// control unit, and the block-request structs that carry 128-bit (16-byte)
// cache blocks between the cache levels. The opcode values follow the RISC-V
// unprivileged ISA; every encoding of the internal select signals is this
// design's own choice.
package riscv_pkg;

  // Instruction opcodes (bits [6:0]).
  typedef enum logic [6:0] {
    OP_LUI    = 7'b0110111,
    OP_AUIPC  = 7'b0010111,
    OP_JAL    = 7'b1101111,
    OP_JALR   = 7'b1100111,
    OP_BRANCH = 7'b1100011,
    OP_LOAD   = 7'b0000011,
    OP_STORE  = 7'b0100011,
    OP_IMM    = 7'b0010011,
    OP_REG    = 7'b0110011
  } opcode_e;

  // ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9,
    ALU_PASSB = 4'd10
  } alu_op_e;

  // Immediate formats.
  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_src_e;

  // Write-back source.
  typedef enum logic [1:0] {
    RES_ALU  = 2'd0,
    RES_MEM  = 2'd1,
    RES_PC4  = 2'd2
  } result_src_e;

  // Memory access width (funct3[1:0] of loads and stores).
  typedef enum logic [1:0] {
    MW_BYTE = 2'd0,
    MW_HALF = 2'd1,
    MW_WORD = 2'd2
  } mem_width_e;

  // Forwarding select for an execute-stage operand.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,   // value read from the register file
    FWD_W    = 2'd1,   // result of the write stage
    FWD_M    = 2'd2    // result of the memory stage
  } fwd_sel_e;

  // Decoded control of one instruction, carried down the pipeline.
  typedef struct packed {
    logic        reg_write;   // writes rd
    result_src_e result_src;  // what is written to rd
    logic        mem_write;   // store
    logic        cache_en;    // load or store: accesses the data cache
    mem_width_e  mem_width;   // byte / half / word
    logic        mem_unsig;   // zero-extending load
    logic        jump;        // JAL
    logic        jalr;        // JALR
    logic        branch;      // conditional branch
    logic [2:0]  br_funct3;   // branch condition
    alu_op_e     alu_op;
    logic        alu_src_b;   // 1: operand B is the immediate
    logic        alu_src_a;   // 1: operand A is the PC (AUIPC)
  } ctrl_t;

  // One instruction leaving the write stage (for observation and checking).
  typedef struct packed {
    logic        valid;      // one-cycle pulse per completed instruction
    logic [31:0] pc;
    logic        reg_write;
    logic [4:0]  rd;
    logic [31:0] rd_data;
    logic        mem_write;
    logic [31:0] mem_addr;   // byte address of a store
    logic [31:0] store_data; // rs2 value of a store
  } retire_t;

  localparam int unsigned BLOCK_BITS = 128;  // 4 words, 16 bytes per block

  typedef logic [BLOCK_BITS-1:0] block_t;

  // Request from a cache to the next level down: one whole 16-byte block.
  typedef struct packed {
    logic        req;    // request valid; held until ack
    logic        we;     // 1 = write the block, 0 = read it
    logic [27:0] baddr;  // block address (byte address >> 4)
    block_t      wdata;
  } blk_req_t;

  // Response from the next level down.
  typedef struct packed {
    logic   ack;         // one-cycle pulse: request done, rdata valid for reads
    block_t rdata;
  } blk_rsp_t;

endpackage
