// reference_programs_tb: the two demonstration programs of the original
// project, rewritten here in RV32I and run on the whole CPU at its default
// sizes and latencies. Both talk to the outside only through register s1
// (written from outside, like a button) and register a0 (shown on a display).
//
// 1. Probability density ("pdf"). The program clears a 256-byte histogram at
//    0x100, then reads data bytes one by one from 0x10000 and counts each
//    value. It stops as soon as one count reaches 200, then reads the 256
//    counts out through a0 one after another and halts. The testbench runs it
//    twice, on two data sets it generates and places in memory: a bell shape
//    (mean of four uniform bytes) and a triangle (mean of two). It works out
//    the histogram itself, and checks every value that a0 takes during
//    read-out, and that the program halts.
// 2. Starting lights ("F1"). While idle, the program counts a seed from 1 to
//    63 over and over until s1 becomes non-zero. It then clears s1 and lights
//    eight lamps one by one on a0 (0x01, 0x03, ... 0xFF) with a fixed delay
//    loop between them. It adds 0x10 to the seed, waits 32 cycles per unit of
//    seed, switches all lamps off and goes back to idle. The testbench
//    presses the button three times, at different times. It checks that a0 stays
//    dark while idle and shows the lamp sequence in order, and that the
//    lamp-to-lamp interval is the same each time. It also checks that the
//    dark wait, less 32 cycles per unit of seed (the seed is read from the
//    register file when the first lamp lights), is the same for the second
//    and third presses (the first also pays for cold cache misses).
//
// The programs follow the behaviour the original project describes for its
// demonstration programs; the instruction sequences, the addresses (except
// the data at 0x10000) and the delay lengths are this testbench's own.
module reference_programs_tb;
  import riscv_pkg::*;
  import rv_tb_pkg::*;

  localparam int LIGHT_DELAY = 300;   // iterations of the fixed delay loop

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

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [31:0] ANDI(int rd, int a, int i); return enc_i(i, a, 3'd7, rd, 7'h13); endfunction

  logic [31:0] prog[$];
  logic [7:0]  data[65536];
  longint cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: ran out of cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Hold reset, write the program at 0 (and data at 0x10000 if asked), release.
  task automatic load_and_start(input bit with_data);
    @(negedge clk) rst = 1;
    for (int l = 0; l < (prog.size() + 3) / 4; l++) begin
      @(negedge clk);
      load_we = 1; load_addr = 28'(l);
      for (int w = 0; w < 4; w++) load_data[32*w +: 32] = (4 * l + w < prog.size()) ? prog[4 * l + w] : 32'h13;
    end
    if (with_data)
      for (int l = 0; l < 4096; l++) begin
        @(negedge clk);
        load_we = 1; load_addr = 28'(32'h1000 + l);
        for (int b = 0; b < 16; b++) load_data[8*b +: 8] = data[16 * l + b];
      end
    @(negedge clk) load_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
  endtask

  // ---------------- probability density ----------------
  localparam logic [31:0] PDF_READOUT_PC = 32'h3C, PDF_HALT_PC = 32'h48;

  function automatic void build_pdf();
    prog.delete();
    prog.push_back(ADDI(5, 0, 0));        // 00 t0 = 0
    prog.push_back(ADDI(6, 0, 256));      // 04 t1 = 256
    prog.push_back(SB(0, 5, 256));        // 08 clear: pdf[t0] = 0
    prog.push_back(ADDI(5, 5, 1));        // 0c
    prog.push_back(BNE(5, 6, -8));        // 10
    prog.push_back(LUI(11, 20'h10));      // 14 a1 = 0x10000
    prog.push_back(ADDI(12, 0, 200));     // 18 a2 = stop count
    prog.push_back(LBU(5, 11, 0));        // 1c build: t0 = sample
    prog.push_back(ADDI(11, 11, 1));      // 20
    prog.push_back(LBU(6, 5, 256));       // 24 t1 = pdf[sample]
    prog.push_back(ADDI(6, 6, 1));        // 28
    prog.push_back(SB(6, 5, 256));        // 2c
    prog.push_back(BNE(6, 12, -20));      // 30
    prog.push_back(ADDI(5, 0, 0));        // 34
    prog.push_back(ADDI(6, 0, 256));      // 38
    prog.push_back(LBU(10, 5, 256));      // 3c read-out: a0 = pdf[t0]
    prog.push_back(ADDI(5, 5, 1));        // 40
    prog.push_back(BNE(5, 6, -8));        // 44
    prog.push_back(JAL(0, 0));            // 48 halt
  endfunction

  int     expect_pdf[256];
  int     got_pdf[$];
  bit     pdf_halted;

  always @(posedge clk) if (!rst && retire.valid) begin
    if (retire.pc == PDF_READOUT_PC && retire.reg_write && retire.rd == 5'd10) got_pdf.push_back(int'(retire.rd_data));
    if (retire.pc == PDF_HALT_PC) pdf_halted = 1;
  end

  task automatic run_pdf(input int terms, input string label);
    longint t0;
    int used;
    // data: mean of `terms` uniform bytes
    for (int i = 0; i < 65536; i++) begin
      int s = 0;
      for (int k = 0; k < terms; k++) s += $urandom_range(255);
      data[i] = 8'(s / terms);
    end
    foreach (expect_pdf[v]) expect_pdf[v] = 0;
    used = 0;
    for (int i = 0; i < 65536; i++) begin
      used++;
      expect_pdf[data[i]]++;
      if (expect_pdf[data[i]] == 200) break;
    end
    build_pdf();
    load_and_start(1);
    got_pdf.delete();
    pdf_halted = 0;
    t0 = cycles;
    wait (pdf_halted);
    repeat (5) @(posedge clk);
    $display("pdf %s: %0d samples counted, %0d cycles", label, used, cycles - t0);
    chk(got_pdf.size() == 256, $sformatf("pdf %s: %0d read-out values, expected 256", label, got_pdf.size()));
    for (int v = 0; v < 256 && v < got_pdf.size(); v++)
      chk(got_pdf[v] == expect_pdf[v], $sformatf("pdf %s: bin %0d is %0d, expected %0d", label, v, got_pdf[v], expect_pdf[v]));
    chk(a0_out == 32'(expect_pdf[255]), $sformatf("pdf %s: a0 left at %0d", label, a0_out));
  endtask

  // ---------------- starting lights ----------------
  function automatic void build_f1();
    prog.delete();
    prog.push_back(ADDI(7, 0, 0));            // 00 t2 = seed
    prog.push_back(ADDI(7, 7, 1));            // 04 idle: seed++
    prog.push_back(ANDI(7, 7, 63));           // 08 keep it below 64
    prog.push_back(BEQ(9, 0, -8));            // 0c wait for s1 != 0
    prog.push_back(ADDI(9, 0, 0));            // 10 consume the press
    prog.push_back(ADDI(10, 0, 0));           // 14 a0 = 0
    prog.push_back(ADDI(29, 0, 8));           // 18 t4 = lamps to light
    prog.push_back(SLLI(10, 10, 1));          // 1c lamp: a0 = a0 << 1 | 1
    prog.push_back(ADDI(10, 10, 1));          // 20
    prog.push_back(ADDI(28, 0, LIGHT_DELAY)); // 24 fixed delay
    prog.push_back(ADDI(28, 28, -1));         // 28
    prog.push_back(BNE(28, 0, -4));           // 2c
    prog.push_back(ADDI(29, 29, -1));         // 30
    prog.push_back(BNE(29, 0, -24));          // 34
    prog.push_back(ADDI(7, 7, 16));           // 38 seed += 0x10
    prog.push_back(SLLI(28, 7, 4));           // 3c random delay: 16 loops per unit
    prog.push_back(ADDI(28, 28, -1));         // 40
    prog.push_back(BNE(28, 0, -4));           // 44
    prog.push_back(ADDI(10, 0, 0));           // 48 lamps off
    prog.push_back(JAL(0, -72));              // 4c back to idle
  endfunction

  // Wait (at most 20000 cycles) for a0 to show a value.
  task automatic wait_a0(input logic [31:0] want);
    for (int i = 0; i < 20000 && a0_out != want; i++) @(posedge clk);
  endtask

  // One press: wait `idle` cycles checking a0 stays dark, press, follow a0.
  // Returns the dark wait less 32 cycles per unit of seed.
  task automatic press(input int idle, output longint off_base);
    longint t_lamp[9];
    int seed;
    longint interval;
    for (int i = 0; i < idle; i++) begin
      @(negedge clk);
      if (i % 64 == 0) chk(a0_out == 0, $sformatf("f1: a0 %h while idle", a0_out));
    end
    @(negedge clk) ext_s1_we = 1; ext_s1_wdata = 32'd1;
    @(negedge clk) ext_s1_we = 0;
    for (int k = 1; k <= 8; k++) begin
      logic [31:0] want = (32'd1 << k) - 1;
      wait_a0(want);
      chk(a0_out == want, $sformatf("f1: lamp %0d: a0 %h, expected %h", k, a0_out, want));
      t_lamp[k] = cycles;
      if (k == 1) seed = int'(dut.u_core.u_rf.regs[7]);
    end
    wait_a0(32'd0);
    chk(a0_out == 0, "f1: lamps switched off");
    t_lamp[0] = cycles;
    interval = t_lamp[3] - t_lamp[2];
    chk(interval >= 2 * LIGHT_DELAY, $sformatf("f1: lamp interval %0d too short", interval));
    for (int k = 3; k <= 8; k++)
      chk(t_lamp[k] - t_lamp[k-1] == interval,
          $sformatf("f1: interval before lamp %0d is %0d, expected %0d", k, t_lamp[k] - t_lamp[k-1], interval));
    chk(seed >= 1 && seed <= 63, $sformatf("f1: seed %0d out of range", seed));
    off_base = (t_lamp[0] - t_lamp[8]) - 32 * seed;
    $display("f1: seed %0d, lamp interval %0d cycles, dark wait %0d cycles", seed, interval, t_lamp[0] - t_lamp[8]);
  endtask

  initial begin
    longint base1, base2, base3;
    load_we = 0; load_addr = 0; load_data = 0; ext_s1_we = 0; ext_s1_wdata = 0;
    void'($urandom(7));
    run_pdf(4, "bell");
    run_pdf(2, "triangle");

    build_f1();
    load_and_start(0);
    press(3000, base1);
    press(2117, base2);
    press(1290, base3);
    // the first run also pays for cold cache misses, so compare the later two
    chk(base2 == base3, $sformatf("f1: dark wait not 32 cycles per seed unit (%0d vs %0d)", base2, base3));
    // back to idle: stays dark with no press
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 64 == 0) chk(a0_out == 0, "f1: dark after the sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
