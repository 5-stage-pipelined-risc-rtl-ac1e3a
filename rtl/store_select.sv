// store_select: memory-stage merge for sub-word stores.
// The caches take whole 32-bit words only. For SB and SH the pipeline first
// reads the aligned word, then this unit replaces the addressed byte or
// halfword of that word with the low bits of the store data; the merged word
// is written in the following cycle. For SW it passes the store data through.
// Combinational, built as three levels of 2:1 selection as the source
// describes (lane select by byte_off[0], by byte_off[1], then by width).
module store_select
  import riscv_pkg::*;
(
  input  logic [31:0] old_word,   // word read from the data cache
  input  logic [31:0] store_data, // rs2 value of the store
  input  logic [1:0]  byte_off,
  input  mem_width_e  width,
  output logic [31:0] merged
);
  logic [31:0] byte_merged, half_merged;
  logic [31:0] lo_byte, hi_byte;
  always_comb begin
    // level 1: byte lane within a halfword
    lo_byte = byte_off[0] ? {old_word[31:16], store_data[7:0], old_word[7:0]}
                          : {old_word[31:8], store_data[7:0]};
    hi_byte = byte_off[0] ? {store_data[7:0], old_word[23:0]}
                          : {old_word[31:24], store_data[7:0], old_word[15:0]};
    // level 2: which halfword
    byte_merged = byte_off[1] ? hi_byte : lo_byte;
    half_merged = byte_off[1] ? {store_data[15:0], old_word[15:0]} : {old_word[31:16], store_data[15:0]};
    // level 3: width
    unique case (width)
      MW_BYTE: merged = byte_merged;
      MW_HALF: merged = half_merged;
      default: merged = store_data;
    endcase
  end
endmodule
