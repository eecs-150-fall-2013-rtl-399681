// load_extract: picks a loaded byte or halfword out of a 32-bit word.
//
// Works in the memory/write-back stage on the word read from block RAM or
// I/O. Memory is big-endian: byte offset 00 is bits [31:24], 01 bits
// [23:16], 10 bits [15:8], 11 bits [7:0]; halfword offset 0x is bits
// [31:16] and 1x bits [15:0]. The selected field is sign-extended (LB, LH)
// or zero-extended (LBU, LHU); words (LW) pass unchanged.
// Timing: combinational.
module load_extract
  import mips150_pkg::*;
(
  input  logic [31:0] rdata,
  input  logic [1:0]  offset,      // byte address bits [1:0]
  input  mem_size_e   mem_size,
  input  logic        mem_unsigned,
  output logic [31:0] data
);

  logic [7:0]  byte_sel;
  logic [15:0] half_sel;

  always_comb begin
    unique case (offset)
      2'b00:   byte_sel = rdata[31:24];
      2'b01:   byte_sel = rdata[23:16];
      2'b10:   byte_sel = rdata[15:8];
      default: byte_sel = rdata[7:0];
    endcase
    half_sel = offset[1] ? rdata[15:0] : rdata[31:16];

    unique case (mem_size)
      SZ_BYTE: data = {{24{byte_sel[7] & ~mem_unsigned}}, byte_sel};
      SZ_HALF: data = {{16{half_sel[15] & ~mem_unsigned}}, half_sel};
      default: data = rdata;
    endcase
  end

endmodule
