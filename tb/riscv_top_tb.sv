// riscv_top_tb: end-to-end test of the whole CPU at its default sizes and
// latencies (1 KiB L1s, 16 KiB L2 with 10-cycle access, 256 KiB memory with
// 100-cycle access, 16-entry predictor).
// The program is assembled here and written into main memory through the
// load port. It runs loops with forwarding and load-use pairs, byte and
// halfword stores and loads, a call and return, a 32 KiB strided store loop
// that overflows both caches so dirty lines travel back to memory, every
// branch type, and a constrained-random section of ALU, load, store and
// forward-branch instructions executed twice. Register s1 is written from
// outside once after reset and the program folds it into a0.
// Every instruction the pipeline completes is compared, in order, with the
// reference model in rv_tb_pkg (PC, destination value, store address and
// data), and a0 is compared at the end. Each mechanism of the design is
// counted and must occur at least once: forwarding from memory and write
// stages, load-use stall, sub-word store stall, misprediction flush,
// correctly predicted taken branch, instruction and data cache refills,
// data cache write-back, L2 hit, L2 miss, L2 write-back to memory, and both
// L1s waiting on the L2 at once. The measured L2 hit time and main memory
// time are checked against 10 and 100 cycles.
module riscv_top_tb;
  import riscv_pkg::*;
  import rv_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic load_we;
  logic [27:0] load_addr;
  block_t load_data;
  logic ext_s1_we;
  logic [31:0] ext_s1_wdata, a0_out;
  retire_t retire;

  riscv_top dut (.*);
  always #5 clk = ~clk;

  localparam logic [31:0] EXT_S1 = 32'h0000_0123;

  rv_prog p;
  rv_iss iss;
  logic [31:0] end_pc;
  longint cycles = 0;
  bit done = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles); end
  endtask

  // mechanism counters
  int n_fwd_m, n_fwd_w, n_load_use, n_ss, n_mispredict, n_pred_ok, n_irefill, n_drefill,
      n_dwb, n_l2_hit, n_l2_miss, n_l2_wb, n_l2_both, n_freeze;
  int l2_start, l2_lat_bad, l2_lat_n, mem_start, mem_lat_bad, mem_lat_n;

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (dut.u_core.u_hz.e_adv && dut.u_core.valid_e) begin
      if (dut.u_core.forward_a_e == FWD_M || dut.u_core.forward_b_e == FWD_M) n_fwd_m++;
      if (dut.u_core.forward_a_e == FWD_W || dut.u_core.forward_b_e == FWD_W) n_fwd_w++;
      if (dut.u_core.pred_taken_e && dut.u_core.taken_e) n_pred_ok++;
    end
    if (!dut.u_core.u_hz.freeze && !dut.u_core.u_hz.ss_stall && !dut.u_core.u_hz.redirect_e &&
        dut.u_core.u_hz.load_use) n_load_use++;
    if (!dut.u_core.u_hz.freeze && dut.u_core.u_hz.ss_stall) n_ss++;
    if (dut.u_core.u_hz.freeze) n_freeze++;
    if (dut.u_core.take_redirect) n_mispredict++;
    if (dut.u_memsys.u_l1i.mreq.req && dut.u_memsys.u_l1i.mrsp.ack) n_irefill++;
    if (dut.u_memsys.u_l1d.state_q == dut.u_memsys.u_l1d.S_FILL && dut.u_memsys.u_l1d.mrsp.ack) n_drefill++;
    if (dut.u_memsys.u_l1d.state_q == dut.u_memsys.u_l1d.S_WB && dut.u_memsys.u_l1d.mrsp.ack) n_dwb++;
    if (dut.u_memsys.u_l2.state_q == dut.u_memsys.u_l2.S_ACCESS && dut.u_memsys.u_l2.cnt_q == 0) begin
      if (dut.u_memsys.u_l2.hit) n_l2_hit++; else n_l2_miss++;
    end
    if (dut.u_memsys.u_l2.state_q == dut.u_memsys.u_l2.S_MEM_WB && dut.u_memsys.u_l2.m_rsp.ack) n_l2_wb++;
    if (dut.u_memsys.u_l2.state_q == dut.u_memsys.u_l2.S_IDLE &&
        dut.u_memsys.i_req.req && dut.u_memsys.d_req.req) n_l2_both++;
    // L2 hit time: request accepted in IDLE (cycle 0) to ack
    if (dut.u_memsys.u_l2.state_q == dut.u_memsys.u_l2.S_IDLE &&
        (dut.u_memsys.i_req.req || dut.u_memsys.d_req.req)) l2_start = int'(cycles);
    if (dut.u_memsys.u_l2.state_q == dut.u_memsys.u_l2.S_ACCESS && dut.u_memsys.u_l2.cnt_q == 0 &&
        dut.u_memsys.u_l2.hit) begin
      // ack follows in the next cycle
      l2_lat_n++;
      if (int'(cycles) + 1 - l2_start != 10) l2_lat_bad++;
    end
    if (!dut.u_memsys.u_mem.busy_q && !dut.u_memsys.u_mem.ack_q && dut.u_memsys.m_req.req) mem_start = int'(cycles);
    if (dut.u_memsys.u_mem.ack_q) begin
      mem_lat_n++;
      if (int'(cycles) - mem_start != 100) mem_lat_bad++;
    end
  end

  // compare every completed instruction with the reference model
  always @(posedge clk) if (!rst && !done && retire.valid) begin
    step_t s;
    s = iss.step();
    chk(retire.pc == s.pc, $sformatf("pc %h vs model %h", retire.pc, s.pc));
    chk(retire.reg_write == s.reg_write && (!s.reg_write || (retire.rd == s.rd && retire.rd_data == s.rd_data)),
        $sformatf("pc %h writes x%0d=%h, model x%0d=%h", s.pc, retire.rd, retire.rd_data, s.rd, s.rd_data));
    if (s.mem_write)
      chk(retire.mem_write && retire.mem_addr == s.mem_addr && retire.store_data == s.store_data,
          $sformatf("pc %h store", s.pc));
    if (s.pc == end_pc) done = 1;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog: ran out of cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; ext_s1_we = 0; ext_s1_wdata = 0;
    p = new();
    p.build();
    end_pc = p.end_pc;
    iss = new(32'h0);
    foreach (p.prog[i]) for (int b = 0; b < 4; b++) iss.wb(32'(4 * i + b), p.prog[i][8*b +: 8]);
    iss.x[9] = EXT_S1;
    $display("program: %0d instructions", p.prog.size());
    // program lines
    for (int l = 0; l < (p.prog.size() + 3) / 4; l++) begin
      @(negedge clk);
      load_we = 1; load_addr = 28'(l);
      for (int w = 0; w < 4; w++) load_data[32*w +: 32] = (4 * l + w < p.prog.size()) ? p.prog[4 * l + w] : 32'h13;
    end
    // zero the random-access data area 0x8000..0x87ff
    for (int l = 0; l < 128; l++) begin
      @(negedge clk);
      load_we = 1; load_addr = 28'(32'h800 + l); load_data = '0;
    end
    @(negedge clk) load_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // the peripheral board writes s1 once
    ext_s1_we = 1; ext_s1_wdata = EXT_S1;
    @(negedge clk) ext_s1_we = 0;
    wait (done);
    repeat (5) @(posedge clk);
    chk(a0_out == iss.x[10], $sformatf("a0 %h vs model %h", a0_out, iss.x[10]));
    $display("cycles=%0d  fwdM=%0d fwdW=%0d load_use=%0d subword=%0d mispredict=%0d pred_taken_ok=%0d",
             cycles, n_fwd_m, n_fwd_w, n_load_use, n_ss, n_mispredict, n_pred_ok);
    $display("I-refill=%0d D-refill=%0d D-writeback=%0d L2 hit=%0d miss=%0d L2-writeback=%0d both-L1-waiting=%0d freeze=%0d",
             n_irefill, n_drefill, n_dwb, n_l2_hit, n_l2_miss, n_l2_wb, n_l2_both, n_freeze);
    chk(n_fwd_m > 0, "forwarding from memory stage happened");
    chk(n_fwd_w > 0, "forwarding from write stage happened");
    chk(n_load_use > 0, "load-use stall happened");
    chk(n_ss > 0, "sub-word store stall happened");
    chk(n_mispredict > 0, "misprediction flush happened");
    chk(n_pred_ok > 0, "correct taken prediction happened");
    chk(n_irefill > 0, "instruction cache refill happened");
    chk(n_drefill > 0, "data cache refill happened");
    chk(n_dwb > 0, "data cache write-back happened");
    chk(n_l2_hit > 0, "L2 hit happened");
    chk(n_l2_miss > 0, "L2 miss happened");
    chk(n_l2_wb > 0, "L2 write-back happened");
    chk(n_l2_both > 0, "both L1s waiting on L2 happened");
    chk(l2_lat_n > 0 && l2_lat_bad == 0, $sformatf("L2 hit time 10 cycles (%0d of %0d wrong)", l2_lat_bad, l2_lat_n));
    chk(mem_lat_n > 0 && mem_lat_bad == 0, $sformatf("memory time 100 cycles (%0d of %0d wrong)", mem_lat_bad, mem_lat_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
