// regfile: 32 x 32-bit register file with two read ports and one write port.
// x0 always reads zero. Reads are combinational; the write happens at the
// rising clock edge, and a read of the register being written in the same
// cycle returns the new value (internal bypass), so the decode stage sees the
// result of the write stage without an extra forwarding path.
// Two extra ports serve an external peripheral board: ext_we/ext_wdata write
// register s1 (x9) directly, and a0_out shows register a0 (x10) at all times.
// The external ports follow the source description; the bypass and giving the
// pipeline's write priority over an external write to s1 in the same cycle
// are this design's choices. All registers reset to zero.
module regfile (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we3,
  input  logic [4:0]  wa3,
  input  logic [31:0] wd3,
  input  logic        ext_we,     // write s1 from outside
  input  logic [31:0] ext_wdata,
  output logic [31:0] a0_out      // register a0 seen from outside
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else begin
      if (ext_we) regs[9] <= ext_wdata;
      if (we3 && wa3 != 5'd0) regs[wa3] <= wd3;
    end
  end

  always_comb begin
    rd1 = (ra1 == 5'd0) ? 32'b0 : (we3 && wa3 == ra1) ? wd3 : regs[ra1];
    rd2 = (ra2 == 5'd0) ? 32'b0 : (we3 && wa3 == ra2) ? wd3 : regs[ra2];
  end

  assign a0_out = regs[10];
endmodule
