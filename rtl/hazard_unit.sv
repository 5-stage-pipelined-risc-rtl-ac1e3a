// hazard_unit: stall, flush and forwarding control of the 5-stage pipeline.
// Forwarding: an execute-stage source register is taken from the memory stage
// result when that stage writes it, else from the write stage result, else
// from the register file value read in decode.
// Stall and flush, in priority order:
//  1. Cache freeze: while the instruction cache (instr_ready low) or the data
//     cache (data_ready_m low) is servicing a miss, every pipeline register
//     holds.
//  2. Sub-word store: an SB or SH in the memory stage first reads the aligned
//     word; fetch, decode, execute and memory hold for that one cycle, a
//     bubble enters the write stage, and ss_phase goes high so that the
//     merged word is written in the next cycle.
//  3. Load-use: a load in execute whose destination is a source of the
//     instruction in decode holds fetch and decode for one cycle and puts a
//     bubble into execute.
//  4. Misprediction: when redirect_e (execute found the fetch-stage guess
//     wrong) the instructions in fetch and decode are flushed and the PC is
//     loaded with the correct address, a 2-cycle penalty.
// e_adv tells the rest of the core that the execute-stage instruction moves
// on this cycle, so a redirect or a predictor update is acted on once.
// The four hazards follow the source; the priority order, the one-flop
// sub-word phase and the forwarding of both operands from both later stages
// are this design's own. Combinational except for the ss_phase flop.
module hazard_unit
  import riscv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // register numbers
  input  logic [4:0]  rs1_d, rs2_d,
  input  logic [4:0]  rs1_e, rs2_e, rd_e,
  input  logic [4:0]  rd_m, rd_w,
  input  logic        reg_write_m, reg_write_w,
  input  logic        load_e,          // load in execute
  input  logic        subword_store_m, // SB or SH in memory
  input  logic        redirect_e,      // execute-stage misprediction
  input  logic        instr_ready,     // instruction cache hit
  input  logic        data_ready_m,    // data cache hit (or no access)
  // controls
  output fwd_sel_e    forward_a_e,
  output fwd_sel_e    forward_b_e,
  output logic        pc_en,
  output logic        fd_en, noop_fd,
  output logic        de_en, noop_de,
  output logic        em_en,
  output logic        mw_en, noop_mw,
  output logic        ss_phase,        // 1: second cycle of a sub-word store
  output logic        e_adv,
  output logic        take_redirect
);
  logic freeze, ss_stall, load_use;

  function automatic fwd_sel_e fwd(input logic [4:0] rs);
    if (reg_write_m && rd_m != 5'd0 && rd_m == rs)      return FWD_M;
    else if (reg_write_w && rd_w != 5'd0 && rd_w == rs) return FWD_W;
    else                                                return FWD_NONE;
  endfunction

  assign forward_a_e = fwd(rs1_e);
  assign forward_b_e = fwd(rs2_e);

  assign freeze   = !instr_ready || !data_ready_m;
  assign ss_stall = subword_store_m && !ss_phase;
  assign load_use = load_e && rd_e != 5'd0 && (rd_e == rs1_d || rd_e == rs2_d);

  always_comb begin
    pc_en = 1'b1; fd_en = 1'b1; noop_fd = 1'b0;
    de_en = 1'b1; noop_de = 1'b0; em_en = 1'b1;
    mw_en = 1'b1; noop_mw = 1'b0;
    take_redirect = 1'b0;
    if (freeze) begin
      pc_en = 1'b0; fd_en = 1'b0; de_en = 1'b0; em_en = 1'b0; mw_en = 1'b0;
    end else if (ss_stall) begin
      pc_en = 1'b0; fd_en = 1'b0; de_en = 1'b0; em_en = 1'b0; noop_mw = 1'b1;
    end else if (redirect_e) begin
      take_redirect = 1'b1; noop_fd = 1'b1; noop_de = 1'b1;
    end else if (load_use) begin
      pc_en = 1'b0; fd_en = 1'b0; noop_de = 1'b1;
    end
  end

  assign e_adv = !freeze && !ss_stall;

  always_ff @(posedge clk) begin
    if (rst)          ss_phase <= 1'b0;
    else if (!freeze) ss_phase <= ss_stall;
  end
endmodule
