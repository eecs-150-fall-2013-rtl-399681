// mem_ctrl: store/load address decode and byte-lane steering.
//
// Works in the execute stage on the byte address computed by the ALU.
// The top nibble selects the targets, one bit each, so that one store can
// reach several devices:
//   addr[31]==0 && addr[28]  data memory        (read/write)
//   addr[31]==0 && addr[29]  instruction memory (write only)
//   addr[31:28]==4'b1000     memory-mapped I/O  (read/write)
// A store to 0x3xxxxxxx therefore writes both memories. For stores the
// module builds the 4-bit byte write mask from the access width and the
// byte offset addr[1:0] (big-endian: offset 00 is bits [31:24], mask bit 3)
// and replicates the store byte or halfword into every lane, so that the
// masked lane receives it. Halfword and word accesses ignore addr[0] and
// addr[1:0] respectively. Timing: combinational; the outputs feed the
// block-RAM and I/O inputs sampled at the end of the execute stage.
module mem_ctrl
  import mips150_pkg::*;
(
  input  logic [31:0] addr,
  input  logic [31:0] store_data,  // rt
  input  logic        mem_read,
  input  logic        mem_write,
  input  mem_size_e   mem_size,
  output logic [3:0]  dmem_we,
  output logic [3:0]  imem_we,
  output logic [31:0] wdata,
  output logic        dmem_sel,    // address lies in the data-memory partition
  output logic        io_sel,      // address lies in the I/O partition
  output logic        io_write,
  output logic        io_read
);

  logic [3:0] mask;
  logic       imem_sel;

  assign dmem_sel = !addr[31] && addr[28];
  assign imem_sel = !addr[31] && addr[29];
  assign io_sel   = (addr[31:28] == IO_NIBBLE);

  always_comb begin
    unique case (mem_size)
      SZ_BYTE: begin
        mask  = 4'b1000 >> addr[1:0];
        wdata = {4{store_data[7:0]}};
      end
      SZ_HALF: begin
        mask  = addr[1] ? 4'b0011 : 4'b1100;
        wdata = {2{store_data[15:0]}};
      end
      default: begin
        mask  = 4'b1111;
        wdata = store_data;
      end
    endcase
  end

  assign dmem_we  = (mem_write && dmem_sel) ? mask : 4'b0000;
  assign imem_we  = (mem_write && imem_sel) ? mask : 4'b0000;
  assign io_write = mem_write && io_sel;
  assign io_read  = mem_read && io_sel;

endmodule
