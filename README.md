# RV32I five-stage pipeline with branch prediction and a three-level cache hierarchy

This is a pipelined RISC-V processor for the complete RV32I base user-level
instruction set, minus FENCE, ECALL/EBREAK and CSR instructions. It is built
to be fast under realistic memory timing rather than to have the best
instructions-per-cycle figure. A 100-cycle main memory sits behind a shared
16 KiB L2 cache (10-cycle access), which feeds separate 1 KiB instruction and
data L1 caches that hit in a single cycle. The core is a classic five-stage
pipeline (fetch, decode, execute, memory, write). It has full forwarding and
a 16-entry branch history table, so taken loop branches cost nothing once
they have been learned.

The RTL re-implements the design described in a student team report on a
pipelined RV32I CPU. Sizes, latencies, the pipeline organisation and the
predictor follow that report. Where the report is silent, this RTL makes its
own choices: write policies, handshakes, encodings, stall priorities and
reset values. They are listed in [Departures and own choices](#departures-and-own-choices).

## Block map

```
riscv_top
├── cpu_core                five-stage pipeline
│   ├── control_unit        instruction decode -> ctrl_t bundle
│   ├── sign_extend         I/S/B/U/J immediates
│   ├── regfile             32x32, plus external s1 write / a0 read
│   ├── alu                 add/sub/shifts/compares/logic, zero flag
│   ├── branch_predictor    16-entry BHT, 2-bit counters
│   ├── load_select         byte/half/word alignment and extension
│   ├── store_select        SB/SH merge into the loaded word
│   └── hazard_unit         forwarding, stalls, flushes, cache freeze
└── memory_hierarchy
    ├── l1_icache           1 KiB, 2-way, LRU, read only
    ├── l1_dcache           1 KiB, 2-way, LRU, write-back
    ├── l2_cache            16 KiB, 4-way, tree pseudo-LRU, write-back, 10 cycles
    └── main_memory         256 KiB, 128-bit port, 100 cycles
```

`riscv_pkg` holds the shared types: opcodes, ALU operations, the control
bundle `ctrl_t`, the retire report `retire_t`, and the block request and
response structs `blk_req_t`/`blk_rsp_t` used between the cache levels.

## The pipeline

| stage | what happens |
|---|---|
| Fetch | `pc_f` addresses the instruction cache. The branch predictor is looked up with the same PC. The next PC is the redirect from execute if there is one, else the predicted target on a predicted-taken hit, else PC+4. |
| Decode | `control_unit` builds the `ctrl_t` bundle. The register file is read, and `sign_extend` forms the immediate. The register file bypasses a same-cycle write to its read ports. |
| Execute | The forwarding muxes pick each operand from the register file value, the write-stage result, or the memory-stage result. Operand A can also be the PC (AUIPC), and operand B the immediate. The ALU computes; a separate adder forms the branch/JAL target `pc+imm` or the JALR target `(rs1+imm) & ~1`. The branch condition uses the ALU: the zero flag of SUB for BEQ/BNE, bit 0 of SLT for BLT/BGE and of SLTU for BLTU/BGEU, with `funct3[0]` inverting the result. |
| Memory | The data cache is accessed at the word-aligned address. `load_select` extracts and extends the addressed byte or halfword. `store_select` merges SB/SH data into the word read. |
| Write | The ALU result, load data or PC+4 goes to `rd`. |

Every fetched instruction travels with a `valid` bit. Flushed slots and
undecodable instructions become all-zero control bundles, which write
nothing.

## Hazards, stalls and flushes

Every pipeline register has an enable; fetch/decode, decode/execute and
memory/write can also load a bubble. `hazard_unit` drives them. It checks the
conditions below in priority order, and the first that holds decides the
cycle:

| # | condition | PC, F/D | D/E | E/M | M/W | cost |
|---|---|---|---|---|---|---|
| 1 | cache miss: `imem_ready` or `dmem_ready` low | hold | hold | hold | hold | until the refill ends |
| 2 | SB/SH in memory, first cycle | hold | hold | hold | bubble | 1 cycle |
| 3 | misprediction found in execute | load redirect, F/D bubble | bubble | advance | advance | 2 cycles |
| 4 | load in execute feeds the instruction in decode | hold | bubble | advance | advance | 1 cycle |

**Forwarding.** For each execute-stage source register, the memory stage wins
over the write stage, which wins over the register file. For JAL/JALR the
value forwarded from the memory stage is PC+4, not the ALU output. A load
cannot forward from the memory stage; rule 4 holds its consumer back one
cycle so the value comes from the write stage instead.

**Sub-word stores.** The caches take and return whole 32-bit words. For SB
and SH the memory stage spends two cycles:

1. It reads the aligned word. `store_select` merges the new byte or halfword
   into it, and the merged word is captured in a register. Everything from
   fetch to memory holds, and a bubble goes to write. A flop in the hazard
   unit (`ss_phase`) records that the first cycle is done.
2. It writes the captured word, and the store moves on.

Both cycles are ordinary data-cache accesses, so a miss in either just
freezes the pipeline as in rule 1.

**Why a held execute stage refreshes its operands.** During a sub-word store
the execute stage holds for a cycle while the write stage drains. If the
held instruction took an operand from the write stage, that producer is gone
next cycle. So whenever the decode/execute register holds, it reloads its
two operand registers with the forwarded values.

**Mispredictions.** Execute compares the real outcome (taken or not) with the
prediction made in fetch. On a mismatch the PC is loaded with the correct
address: the target if taken, PC+4 if not. The two younger instructions in
fetch and decode are flushed, so the penalty is 2 cycles. JALR is never
predicted, so every JALR costs 2 cycles. The redirect and the predictor
update happen only in the cycle the execute instruction actually moves on
(`e_adv`), so a held branch acts once.

**Cache freeze.** A miss in either L1 freezes the whole pipeline, including
the write stage. The write stage rewrites the same register each frozen
cycle, which is harmless. The instruction cache keeps refilling for the
frozen PC, even when that PC is on a path about to be squashed.

## Branch prediction

`branch_predictor` is a direct-mapped table of 16 entries, indexed by PC
bits [5:2]. Each entry holds a valid bit, the full 32-bit address of a
branch or JAL, its target, and a 2-bit saturating counter:

| state | prediction | on taken | on not taken |
|---|---|---|---|
| 3 strongly taken | taken | 3 | 2 |
| 2 weakly taken | taken | 3 | 1 |
| 1 weakly not taken | not taken | 2 | 0 |
| 0 strongly not taken | not taken | 1 | 0 |

- **Lookup** is combinational in fetch. A PC match with the counter at 2 or 3
  redirects fetch to the stored target.
- **Update** happens from execute for every conditional branch and JAL. A
  recorded instruction moves its counter one step.
- **Recording.** An unrecorded instruction is written into its slot the first
  time it is *taken*, starting at weakly taken and replacing whatever was
  there. A branch that is never taken is therefore never recorded, and is
  predicted not taken for free.
- JALR is never recorded.

Because the full address is the tag, and branch and JAL targets depend only
on the PC, a hit always supplies the right target. Only the direction can be
wrong.

## Memory hierarchy

| level | size | organisation | block | replacement | write policy | access |
|---|---|---|---|---|---|---|
| L1 I | 1 KiB | 2-way, 32 sets | 16 B | LRU (1 bit/set) | read only | 1 cycle hit |
| L1 D | 1 KiB | 2-way, 32 sets | 16 B | LRU (1 bit/set) | write-back, write-allocate | 1 cycle hit |
| L2 | 16 KiB | 4-way, 256 sets, shared | 16 B | tree pseudo-LRU (3 bits/set) | write-back | 10 cycles |
| main | 256 KiB | 16 384 lines of 16 B | 16 B | – | – | 100 cycles |

The CPU-to-L1 ports are 32 bits wide; all other ports carry a whole 128-bit
block.

**Block protocol.** A requester raises `req` with `we`, a block address
(byte address >> 4) and, for writes, the block. It holds them until the
responder pulses `ack` for one cycle, with the read block valid in that same
cycle. The responder counts its latency from the first cycle it sees `req`.
After an ack, the same port waits one idle cycle before its next request is
accepted.

**L1 miss.** The L1 drops `ready` in the cycle of the miss. A dirty victim
(data cache only) is first written down as a whole block. The missing block
is then read and placed in the LRU way, and the access hits on the next
cycle. L1 hits are fully combinational: tag compare plus array read in the
same cycle.

**L2.** The L2 handles one request at a time. When both L1s are waiting, it
serves the one it did not serve last, so the two alternate. On a miss the
victim is an invalid way if one exists, else the pseudo-LRU way; if dirty,
it is written to main memory first. A read miss then fetches the block. A
write miss needs no fetch, because L1 write-backs always carry a whole
block.

**Miss costs** seen by the pipeline (stall cycles of one access, measured by
the testbenches):

| case | stall cycles |
|---|---|
| L1 hit | 0 |
| L1 miss, L2 hit | 1 + 10 + 1 = 12 |
| L1 miss, L2 miss, clean L2 victim | 1 + 10 + 100 + 1 + 1 = 113 |
| each dirty victim written down on the way | + one lower-level access |

There is no coherence between the two L1s. Code that stores into its own
instruction stream is not supported.

## Ports of `riscv_top`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst` | in | 1 | rising-edge clock; synchronous active-high reset |
| `load_we`, `load_addr`, `load_data` | in | 1, 28, 128 | writes one 16-byte line of main memory directly; use while `rst` is high to place a program and its data |
| `ext_s1_we`, `ext_s1_wdata` | in | 1, 32 | writes register s1 (x9) from outside, e.g. a button or a value from a host board |
| `a0_out` | out | 32 | register a0 (x10), e.g. to drive a display or LEDs |
| `retire` | out | `retire_t` | pulses once per completed instruction, with its PC, destination and value, and store address and data |

Execution starts at `RESET_PC` (default 0). Main memory is not cleared by
reset. Addresses wrap modulo 256 KiB, so code linked at, for example,
`0xBFC00000` runs from line 0 if `RESET_PC` is set to that address.

Parameters, all defaulting to the sizes above: `RESET_PC`, `BHT_ENTRIES`,
`L1I_BYTES`, `L1D_BYTES`, `L2_BYTES`, `L2_LATENCY`, `MEM_BYTES`,
`MEM_LATENCY`. The L1s are fixed at 2 ways and the L2 at 4 ways; cache sizes
must be powers of two. The latency counters need latencies of at least 2.

## Simulation

Each block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. A testbench compiles with the package first
and the modules it needs. For example, for the whole CPU:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/riscv_pkg.sv rtl/*.sv tb/rv_tb_pkg.sv tb/riscv_top_tb.sv --top-module riscv_top_tb
./obj_dir/Vriscv_top_tb
```

The cache testbenches also need `tb/blk_mem_model.sv`, a behavioural
next-level memory with configurable latency.

- **`riscv_top_tb`** runs the whole CPU at default sizes, about 450 000
  cycles, in under a second. A small assembler and an instruction-set
  reference model are in `tb/rv_tb_pkg.sv`. The testbench assembles a
  program of about 800 instructions and loads it through the load port:
  - loops with forwarding and load-use pairs;
  - byte and halfword stores and loads;
  - calls and returns;
  - a 32 KiB strided store loop that overflows both caches, so dirty lines
    travel back to main memory;
  - every branch type;
  - a constrained-random section of ALU, load, store and short forward-branch
    instructions, run twice.

  Each completed instruction is compared with the reference model (PC,
  destination value, store address and data). The testbench also counts
  each mechanism and fails if any never happened: both forwarding paths,
  load-use stall, sub-word stall, misprediction, correct taken prediction,
  I and D refills, D write-back, L2 hit, miss and write-back, and both L1s
  waiting on the L2. It checks the 10-cycle L2 hit and the 100-cycle memory
  access on every occurrence.
- **`cpu_core_tb`** runs the same program on ideal memories that randomly go
  not-ready. It also measures the 2-cycle misprediction penalty.
- **`memory_hierarchy_tb`** runs concurrent fetch and load/store traffic
  against a flat model. It checks the 0-, 12- and 113-cycle access times.
- **`reference_programs_tb`** runs two small programs in the style of the
  original project's demonstration programs:
  - A histogram ("probability density"). Bytes are read from 0x10000 and
    counted into 256 bins until one bin reaches 200. The bins are then read
    out through a0. The program is run on a bell-shaped and on a triangular
    data set, and every value a0 takes is checked. This takes about 600 000
    cycles, most of it the 113-cycle misses of the data stream.
  - Starting lights. An idle loop counts a seed until s1 is written from
    outside. Eight lamps then light one by one on a0 with a fixed delay,
    followed by a dark wait that grows by 32 cycles per unit of seed. The
    button is pressed three times, and the lamp order and timing are
    checked.
- **Unit testbenches:** `alu_tb`, `regfile_tb`, `control_unit_tb`,
  `sign_extend_tb`, `load_select_tb`, `store_select_tb`,
  `branch_predictor_tb`, `hazard_unit_tb`, `l1_icache_tb`, `l1_dcache_tb`,
  `l2_cache_tb` and `main_memory_tb` compare against models written
  independently in the testbench.

## Departures and own choices

Taken from the original report:
- the five stages and forwarding from the memory and write stages;
- the one-cycle load-use stall;
- the SB/SH read-merge-write with a one-cycle stall, and the three-level
  `store_select`;
- fetch and decode flushed on a misprediction (2 cycles);
- the 16-entry direct-mapped BHT with address, target and 2-bit counter,
  entries starting at weakly taken, and no JALR;
- all cache geometries, LRU in L1, pseudo-LRU in L2, and single-cycle L1
  hits;
- the 10-cycle L2, the L2 serving one request at a time and alternating, and
  the 100-cycle main memory with a 16-byte port;
- 32-bit CPU ports and 128-bit block ports;
- the register file's external s1 write and a0 read.

Chosen here, because the report does not say:
- **Write policies.** Both caches are write-back; the L1 data cache is also
  write-allocate. In the L2 a write miss takes the written block without a
  fetch.
- **Pseudo-LRU form:** a tree; invalid ways are filled first.
- **Protocols:** the block request/ack protocol and the L1 `ready` signal;
  a miss freezes the whole pipeline.
- **Priority of simultaneous hazards** (the table above), and the operand
  refresh in a held execute stage.
- **Predictor recording:** an instruction is recorded only the first time
  it is taken; the stored address is the full 32 bits.
- **Decoding:** the encodings of every internal select. FENCE, ECALL/EBREAK,
  CSR and unknown instructions execute as no-operations; there are no
  exceptions or traps.
- **Misaligned accesses** are not trapped: a halfword access ignores
  address bit 0 and a word access ignores bits 1:0, so they reach the
  aligned halfword or word.
- **Reset and loading:** registers, caches and predictor reset to empty or
  zero; main memory is not reset, and the load port exists to fill it.
- **Register file:** the write happens on the rising edge with a
  same-cycle bypass. A pipeline write to s1 wins over a simultaneous
  external write.

Not included: the external peripheral board itself (only its two register
ports), memory-mapped I/O, and the timing/critical-path analysis of the
report. Nothing here has been synthesised to a technology. The caches and
main memory are written as plain arrays that a synthesis tool would map to
memories; no SRAM macros are instantiated.
