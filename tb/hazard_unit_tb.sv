// hazard_unit_tb: random hazard situations against the expected action of
// each pipeline register (advance, hold or bubble) and the forwarding
// choices, derived here from the rules: a cache miss freezes everything; an
// SB/SH in memory holds fetch..memory for one cycle and sends a bubble to
// write; a misprediction flushes fetch and decode; a load-use pair holds
// fetch/decode and sends a bubble to execute. Also checks that the sub-word
// phase lasts exactly one cycle.
module hazard_unit_tb;
  import riscv_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [4:0] rs1_d, rs2_d, rs1_e, rs2_e, rd_e, rd_m, rd_w;
  logic reg_write_m, reg_write_w, load_e, subword_store_m, redirect_e, instr_ready, data_ready_m;
  fwd_sel_e forward_a_e, forward_b_e;
  logic pc_en, fd_en, noop_fd, de_en, noop_de, em_en, mw_en, noop_mw, ss_phase, e_adv, take_redirect;
  hazard_unit dut (.*);
  always #5 clk = ~clk;

  typedef enum {ADV, HOLD, BUB} act_e;
  function automatic act_e act(input logic en, input logic noop);
    return !en ? HOLD : noop ? BUB : ADV;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic exp_phase;
  initial begin
    {rs1_d, rs2_d, rs1_e, rs2_e, rd_e, rd_m, rd_w} = '0;
    {reg_write_m, reg_write_w, load_e, subword_store_m, redirect_e} = '0;
    instr_ready = 1; data_ready_m = 1;
    exp_phase = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 20000; n++) begin
      act_e f, d, e, m, w;
      fwd_sel_e fa, fb;
      logic frz, ss, lu;
      @(negedge clk);
      rs1_d = 5'($urandom_range(0, 7)); rs2_d = 5'($urandom_range(0, 7));
      rs1_e = 5'($urandom_range(0, 7)); rs2_e = 5'($urandom_range(0, 7));
      rd_e = 5'($urandom_range(0, 7)); rd_m = 5'($urandom_range(0, 7)); rd_w = 5'($urandom_range(0, 7));
      reg_write_m = 1'($urandom); reg_write_w = 1'($urandom);
      load_e = ($urandom_range(0, 3) == 0);
      subword_store_m = ($urandom_range(0, 5) == 0);
      redirect_e = !load_e && ($urandom_range(0, 3) == 0);
      instr_ready = ($urandom_range(0, 7) != 0); data_ready_m = ($urandom_range(0, 7) != 0);
      #1;
      // forwarding: memory stage first
      fa = (reg_write_m && rd_m != 0 && rd_m == rs1_e) ? FWD_M : (reg_write_w && rd_w != 0 && rd_w == rs1_e) ? FWD_W : FWD_NONE;
      fb = (reg_write_m && rd_m != 0 && rd_m == rs2_e) ? FWD_M : (reg_write_w && rd_w != 0 && rd_w == rs2_e) ? FWD_W : FWD_NONE;
      chk(forward_a_e == fa && forward_b_e == fb, "forwarding");
      frz = !instr_ready || !data_ready_m;
      ss  = subword_store_m && !exp_phase;
      lu  = load_e && rd_e != 0 && (rd_e == rs1_d || rd_e == rs2_d);
      {f, d, e, m, w} = {ADV, ADV, ADV, ADV, ADV};
      if (frz)             {f, d, e, m, w} = {HOLD, HOLD, HOLD, HOLD, HOLD};
      else if (ss)         {f, d, e, m, w} = {HOLD, HOLD, HOLD, HOLD, BUB};
      else if (redirect_e) {f, d, e} = {ADV, BUB, BUB};
      else if (lu)         {f, d, e} = {HOLD, HOLD, BUB};
      chk((pc_en ? ADV : HOLD) == f, "pc");
      chk(act(fd_en, noop_fd) == d, "fetch/decode register");
      chk(act(de_en, noop_de) == e, "decode/execute register");
      chk(act(em_en, 1'b0) == m, "execute/memory register");
      chk(act(mw_en, noop_mw) == w, "memory/write register");
      chk(take_redirect == (redirect_e && !frz && !ss), "redirect taken once");
      chk(e_adv == (!frz && !ss), "execute advance");
      chk(ss_phase == exp_phase, "sub-word phase");
      @(posedge clk);
      if (!frz) exp_phase = ss;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
