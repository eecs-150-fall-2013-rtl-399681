// imem_blk_ram: instruction memory, a simple dual-port block RAM.
//
// DEPTH rows of 32 bits, word addressed (4096 rows, 12-bit addresses, by
// default). Port A is write-only and used by store instructions whose
// address selects the instruction-memory partition; wea is a byte mask in
// which bit 3 enables bits [31:24] (byte offset 00, the RAM is big-endian)
// and bit 0 enables bits [7:0]. Port B is read-only and used by instruction
// fetch. The read is synchronous: doutb shows the row addressed by addrb
// at the previous rising edge. The contents have no reset. When INIT_FILE
// names a hex file ($readmemh format, one 32-bit word per line) the array
// is preloaded from it, which is how the FPGA RAM receives its boot
// program; otherwise a testbench may write the array directly.
module imem_blk_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter string       INIT_FILE = "",   // optional $readmemh image, one word per line
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: write
  input  logic [AW-1:0] addra,
  input  logic [3:0]    wea,
  input  logic [31:0]   dina,
  // port B: read
  input  logic [AW-1:0] addrb,
  output logic [31:0]   doutb
);

  logic [31:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (wea[i]) mem[addra][i*8 +: 8] <= dina[i*8 +: 8];
    end
  end

  always_ff @(posedge clk) begin
    doutb <= mem[addrb];
  end

endmodule
