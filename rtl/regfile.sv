// regfile: 32 x 32-bit MIPS register file.
//
// Two asynchronous read ports and one synchronous write port on the positive
// clock edge, as the CPU specification requires. Register 0 always reads as
// zero and writes to it are ignored. A write becomes visible on the read
// ports right after the clock edge that performs it; there is no internal
// write-to-read bypass within the same cycle (the CPU's forwarding unit
// covers that case). The registers have no reset; software initialises
// what it uses.
// Interface: ra1/ra2 -> rd1/rd2 (combinational), we/wa/wd (sampled at clk).
module regfile (
  input  logic        clk,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);

  // kept in distributed (LUT) RAM so that the reads stay asynchronous on an FPGA
  (* ram_style = "distributed" *) logic [31:0] regs [1:31];

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0) regs[wa] <= wd;
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : regs[ra2];

endmodule
