// load_select: memory-stage load alignment.
// The data cache returns the whole aligned 32-bit word. This unit picks the
// byte (LB/LBU) or halfword (LH/LHU) addressed by the low address bits, or the
// whole word (LW), and sign- or zero-extends it to 32 bits. Combinational.
// The block's place between data cache and write stage follows the datapath
// diagram; little-endian lane selection follows RV32I.
module load_select
  import riscv_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  byte_off,
  input  mem_width_e  width,
  input  logic        unsigned_ld,
  output logic [31:0] data
);
  logic [7:0]  b;
  logic [15:0] h;
  always_comb begin
    b = word[8*byte_off +: 8];
    h = byte_off[1] ? word[31:16] : word[15:0];
    unique case (width)
      MW_BYTE: data = unsigned_ld ? {24'b0, b} : {{24{b[7]}}, b};
      MW_HALF: data = unsigned_ld ? {16'b0, h} : {{16{h[15]}}, h};
      default: data = word;
    endcase
  end
endmodule
