// branch_predictor_tb: random updates from a pool of branch addresses (some
// mapping to the same slot) and random lookups, against a model table that
// applies the four-state transition diagram written out as a table here.
// Also checks that JALR-like updates (neither branch nor jump) and disabled
// updates change nothing, and that a repeatedly taken branch saturates.
module branch_predictor_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [31:0] pc_f, predict_target, pc_e, target_e;
  logic predict_taken, upd_en, branch_e, jump_e, taken_e;
  branch_predictor dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit v; logic [31:0] a, t; int st; } ent_t;
  ent_t m [16];
  // next state [state][taken]: 3 strong T, 2 weak T, 1 weak NT, 0 strong NT
  int nxt [4][2] = '{'{0, 1}, '{0, 2}, '{1, 3}, '{2, 3}};
  logic [31:0] pool [24];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s pc=%h", what, pc_f); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_en = 0; branch_e = 0; jump_e = 0; taken_e = 0; pc_e = 0; target_e = 0; pc_f = 0;
    foreach (m[i]) m[i].v = 0;
    foreach (pool[i]) pool[i] = {16'h0, 12'($urandom), 4'b0} | (32'(i % 16) << 2);
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      int k, idx;
      @(negedge clk);
      k = $urandom_range(0, 23);
      pc_e = pool[k]; target_e = pc_e + 32'h40 + 32'(k * 8);
      upd_en = ($urandom_range(0, 9) != 0);
      case ($urandom_range(0, 5))
        0: begin branch_e = 0; jump_e = 1; taken_e = 1; end
        1: begin branch_e = 0; jump_e = 0; taken_e = 1; end   // JALR: not recorded
        default: begin branch_e = 1; jump_e = 0; taken_e = ($urandom_range(0, 3) != 0); end
      endcase
      pc_f = (n % 2) ? pool[$urandom_range(0, 23)] : $urandom & 32'hffc;
      #1;
      idx = int'(pc_f[5:2]);
      if (m[idx].v && m[idx].a == pc_f) begin
        chk(predict_taken == (m[idx].st >= 2), "predict_taken");
        if (predict_taken) chk(predict_target == m[idx].t, "predict_target");
      end else chk(!predict_taken, "no prediction without entry");
      @(posedge clk);
      idx = int'(pc_e[5:2]);
      if (upd_en && (branch_e || jump_e)) begin
        if (m[idx].v && m[idx].a == pc_e) m[idx].st = nxt[m[idx].st][taken_e];
        else if (taken_e) m[idx] = '{1, pc_e, target_e, 2};
      end
    end
    // saturation: five taken then one not taken still predicts taken
    @(negedge clk);
    pc_e = 32'h0000_1000; target_e = 32'h2000; branch_e = 1; jump_e = 0; taken_e = 1; upd_en = 1;
    repeat (5) @(negedge clk);
    taken_e = 0; @(negedge clk); upd_en = 0;
    pc_f = 32'h0000_1000; #1;
    chk(predict_taken && predict_target == 32'h2000, "strongly taken survives one not-taken");
    upd_en = 1; @(negedge clk); upd_en = 0; #1;
    chk(!predict_taken, "two not-taken from strong gives not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
