// cpu_core: the 5-stage RV32I pipeline (fetch, decode, execute, memory,
// write) without its caches.
// Fetch: the PC addresses the instruction cache; the branch predictor is
// looked up with the same PC and, on a predicted-taken hit, the next PC is
// its stored target, else PC+4. Decode: control unit, register file read and
// immediate generation. Execute: forwarding muxes, ALU, branch condition and
// the target adder (PC+imm, or rs1+imm for JALR). The actual outcome is
// compared with the prediction carried from fetch; on a mismatch the PC is
// redirected and fetch and decode are flushed, and the predictor is updated
// with every branch and JAL. Memory: the data cache is accessed with the
// aligned word address; the load select unit aligns and extends loaded
// data, and the store select unit merges SB/SH data into the word read in
// the first of their two memory cycles, the merged word being written in the
// second. Write: ALU result, load data or PC+4 is written to rd.
// Every pipeline register holds while either cache reports a miss.
// Interface: imem_* is the 32-bit instruction port, dmem_* the 32-bit data
// port (word aligned, ready low while a miss is serviced); ext_s1_* and
// a0_out are the peripheral-board ports of the register file; retire reports
// each completed instruction. The structure follows the datapath diagram of
// the source; the predictor-driven next-PC selection, the operand capture
// in a held execute stage, forwarding of PC+4 from the memory stage and the
// reset PC are this design's own.
module cpu_core
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter int unsigned BHT_ENTRIES = 16
) (
  input  logic        clk,
  input  logic        rst,
  // instruction cache
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  input  logic        imem_ready,
  // data cache
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_ready,
  // peripheral board access to the register file
  input  logic        ext_s1_we,
  input  logic [31:0] ext_s1_wdata,
  output logic [31:0] a0_out,
  // completed instructions
  output retire_t     retire
);
  localparam logic [31:0] NOP = 32'h0000_0013;

  // hazard controls
  fwd_sel_e forward_a_e, forward_b_e;
  logic pc_en, fd_en, noop_fd, de_en, noop_de, em_en, mw_en, noop_mw;
  logic ss_phase, e_adv, take_redirect;

  // ---------------- fetch ----------------
  logic [31:0] pc_f, pc_plus4_f, pc_next_f;
  logic        pred_taken_f;
  logic [31:0] pred_target_f;
  logic        taken_e, redirect_e;
  logic [31:0] target_e, pc_plus4_e;

  assign pc_plus4_f = pc_f + 32'd4;
  assign imem_addr  = pc_f;

  always_comb begin
    if (take_redirect)     pc_next_f = taken_e ? target_e : pc_plus4_e;
    else if (pred_taken_f) pc_next_f = pred_target_f;
    else                   pc_next_f = pc_plus4_f;
  end

  always_ff @(posedge clk) begin
    if (rst)        pc_f <= RESET_PC;
    else if (pc_en) pc_f <= pc_next_f;
  end

  // ---------------- fetch / decode register ----------------
  logic        valid_d, pred_taken_d;
  logic [31:0] instr_d, pc_d, pc_plus4_d;

  always_ff @(posedge clk) begin
    if (rst || (noop_fd && fd_en)) begin
      valid_d <= 1'b0; instr_d <= NOP; pc_d <= '0; pc_plus4_d <= '0; pred_taken_d <= 1'b0;
    end else if (fd_en) begin
      valid_d <= 1'b1; instr_d <= imem_rdata; pc_d <= pc_f; pc_plus4_d <= pc_plus4_f;
      pred_taken_d <= pred_taken_f;
    end
  end

  // ---------------- decode ----------------
  ctrl_t       ctrl_dec, ctrl_d;
  imm_src_e    imm_src_d;
  logic [4:0]  rs1_d, rs2_d, rd_d;
  logic [31:0] rd1_d, rd2_d, imm_d;
  logic        reg_write_w;
  logic [4:0]  rd_w;
  logic [31:0] result_w;

  assign rs1_d = instr_d[19:15];
  assign rs2_d = instr_d[24:20];
  assign rd_d  = instr_d[11:7];

  control_unit u_ctrl (.instr(instr_d), .ctrl(ctrl_dec), .imm_src(imm_src_d), .valid_op());
  assign ctrl_d = valid_d ? ctrl_dec : '0;

  sign_extend u_ext (.instr(instr_d[31:7]), .imm_src(imm_src_d), .imm(imm_d));

  regfile u_rf (
    .clk, .rst,
    .ra1(rs1_d), .ra2(rs2_d), .rd1(rd1_d), .rd2(rd2_d),
    .we3(reg_write_w), .wa3(rd_w), .wd3(result_w),
    .ext_we(ext_s1_we), .ext_wdata(ext_s1_wdata), .a0_out(a0_out)
  );

  // ---------------- decode / execute register ----------------
  ctrl_t       ctrl_e;
  logic        valid_e, pred_taken_e;
  logic [31:0] rd1_e, rd2_e, imm_e, pc_e;
  logic [4:0]  rs1_e, rs2_e, rd_e;
  logic [31:0] fa_e, fb_e;

  always_ff @(posedge clk) begin
    if (rst || (noop_de && de_en)) begin
      ctrl_e <= '0; valid_e <= 1'b0; pred_taken_e <= 1'b0;
      rd1_e <= '0; rd2_e <= '0; imm_e <= '0; pc_e <= '0; pc_plus4_e <= '0;
      rs1_e <= '0; rs2_e <= '0; rd_e <= '0;
    end else if (de_en) begin
      ctrl_e <= ctrl_d; valid_e <= valid_d; pred_taken_e <= pred_taken_d;
      rd1_e <= rd1_d; rd2_e <= rd2_d; imm_e <= imm_d; pc_e <= pc_d; pc_plus4_e <= pc_plus4_d;
      rs1_e <= rs1_d; rs2_e <= rs2_d; rd_e <= rd_d;
    end else begin
      // held: keep the forwarded operands, whose producers may leave meanwhile
      rd1_e <= fa_e; rd2_e <= fb_e;
    end
  end

  // ---------------- execute ----------------
  logic [31:0] alu_result_m, pc_plus4_m, fwd_m;
  logic [31:0] src_a_e, src_b_e, alu_y_e;
  logic        zero_e, cond_e;

  always_comb begin
    unique case (forward_a_e)
      FWD_M:   fa_e = fwd_m;
      FWD_W:   fa_e = result_w;
      default: fa_e = rd1_e;
    endcase
    unique case (forward_b_e)
      FWD_M:   fb_e = fwd_m;
      FWD_W:   fb_e = result_w;
      default: fb_e = rd2_e;
    endcase
  end

  assign src_a_e = ctrl_e.alu_src_a ? pc_e : fa_e;
  assign src_b_e = ctrl_e.alu_src_b ? imm_e : fb_e;

  alu u_alu (.op(ctrl_e.alu_op), .a(src_a_e), .b(src_b_e), .y(alu_y_e), .zero(zero_e));

  // BEQ/BNE test zero, the others bit 0 of SLT/SLTU; funct3[0] inverts
  assign cond_e   = ((ctrl_e.br_funct3[2:1] == 2'b00) ? zero_e : alu_y_e[0]) ^ ctrl_e.br_funct3[0];
  assign taken_e  = ctrl_e.jump || ctrl_e.jalr || (ctrl_e.branch && cond_e);
  assign target_e = ctrl_e.jalr ? ((fa_e + imm_e) & ~32'd1) : (pc_e + imm_e);
  assign redirect_e = valid_e && (taken_e != pred_taken_e);

  branch_predictor #(.ENTRIES(BHT_ENTRIES)) u_bp (
    .clk, .rst,
    .pc_f, .predict_taken(pred_taken_f), .predict_target(pred_target_f),
    .upd_en(e_adv && valid_e), .pc_e, .branch_e(ctrl_e.branch), .jump_e(ctrl_e.jump),
    .taken_e, .target_e
  );

  // ---------------- execute / memory register ----------------
  ctrl_t       ctrl_m;
  logic        valid_m;
  logic [31:0] write_data_m, pc_m;
  logic [4:0]  rd_m;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_m <= '0; valid_m <= 1'b0; alu_result_m <= '0; write_data_m <= '0;
      pc_plus4_m <= '0; pc_m <= '0; rd_m <= '0;
    end else if (em_en) begin
      ctrl_m <= ctrl_e; valid_m <= valid_e; alu_result_m <= alu_y_e; write_data_m <= fb_e;
      pc_plus4_m <= pc_plus4_e; pc_m <= pc_e; rd_m <= rd_e;
    end
  end

  // ---------------- memory ----------------
  logic        subword_store_m;
  logic [31:0] ls_output_m, ss_output_m, ss_data_q;

  assign subword_store_m = ctrl_m.mem_write && ctrl_m.mem_width != MW_WORD;
  assign fwd_m = (ctrl_m.result_src == RES_PC4) ? pc_plus4_m : alu_result_m;

  assign dmem_req   = ctrl_m.cache_en;
  assign dmem_we    = ctrl_m.mem_write && (!subword_store_m || ss_phase);
  assign dmem_addr  = {alu_result_m[31:2], 2'b00};
  assign dmem_wdata = subword_store_m ? ss_data_q : write_data_m;

  load_select u_ls (
    .word(dmem_rdata), .byte_off(alu_result_m[1:0]), .width(ctrl_m.mem_width),
    .unsigned_ld(ctrl_m.mem_unsig), .data(ls_output_m)
  );

  store_select u_ss (
    .old_word(dmem_rdata), .store_data(write_data_m), .byte_off(alu_result_m[1:0]),
    .width(ctrl_m.mem_width), .merged(ss_output_m)
  );

  // merged sub-word store data, written in the store's second memory cycle
  always_ff @(posedge clk) begin
    if (rst)           ss_data_q <= '0;
    else if (!ss_phase) ss_data_q <= ss_output_m;
  end

  // ---------------- memory / write register ----------------
  ctrl_t       ctrl_w;
  logic        fresh_w;
  logic [31:0] alu_result_w, read_data_w, pc_plus4_w, pc_w, mem_addr_w, store_data_w;

  always_ff @(posedge clk) begin
    if (rst || (noop_mw && mw_en)) begin
      ctrl_w <= '0; fresh_w <= 1'b0; rd_w <= '0;
      alu_result_w <= '0; read_data_w <= '0; pc_plus4_w <= '0; pc_w <= '0;
      mem_addr_w <= '0; store_data_w <= '0;
    end else if (mw_en) begin
      ctrl_w <= ctrl_m; fresh_w <= valid_m; rd_w <= rd_m;
      alu_result_w <= alu_result_m; read_data_w <= ls_output_m; pc_plus4_w <= pc_plus4_m;
      pc_w <= pc_m; mem_addr_w <= alu_result_m; store_data_w <= write_data_m;
    end else begin
      fresh_w <= 1'b0;
    end
  end

  // ---------------- write ----------------
  assign reg_write_w = ctrl_w.reg_write;
  always_comb begin
    unique case (ctrl_w.result_src)
      RES_MEM: result_w = read_data_w;
      RES_PC4: result_w = pc_plus4_w;
      default: result_w = alu_result_w;
    endcase
  end

  always_comb begin
    retire.valid      = fresh_w;
    retire.pc         = pc_w;
    retire.reg_write  = ctrl_w.reg_write && rd_w != 5'd0;
    retire.rd         = rd_w;
    retire.rd_data    = result_w;
    retire.mem_write  = ctrl_w.mem_write;
    retire.mem_addr   = mem_addr_w;
    retire.store_data = store_data_w;
  end

  // ---------------- hazard unit ----------------
  hazard_unit u_hz (
    .clk, .rst,
    .rs1_d, .rs2_d, .rs1_e, .rs2_e, .rd_e, .rd_m, .rd_w,
    .reg_write_m(ctrl_m.reg_write), .reg_write_w,
    .load_e(ctrl_e.result_src == RES_MEM && ctrl_e.reg_write),
    .subword_store_m, .redirect_e,
    .instr_ready(imem_ready), .data_ready_m(dmem_ready),
    .forward_a_e, .forward_b_e,
    .pc_en, .fd_en, .noop_fd, .de_en, .noop_de, .em_en, .mw_en, .noop_mw,
    .ss_phase, .e_adv, .take_redirect
  );
endmodule
