// dmem_blk_ram: data memory, a single-port block RAM.
//
// DEPTH rows of 32 bits, word addressed (4096 rows, 12-bit addresses, by
// default). wea is a byte write mask in which bit 3 enables bits [31:24]
// (byte offset 00: the RAM is big-endian) and bit 0 enables bits [7:0];
// wea = 4'b1111 writes the whole word. The read is synchronous and
// read-first: douta shows the row addressed at the previous rising edge as
// it was before any write made at that edge. The contents have no reset;
// when INIT_FILE names a hex file ($readmemh format, one 32-bit word per
// line) the array is preloaded from it.
module dmem_blk_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter string       INIT_FILE = "",   // optional $readmemh image, one word per line
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addra,
  input  logic [3:0]    wea,
  input  logic [31:0]   dina,
  output logic [31:0]   douta
);

  logic [31:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (wea[i]) mem[addra][i*8 +: 8] <= dina[i*8 +: 8];
    end
    douta <= mem[addra];
  end

endmodule
