// io_map: memory-mapped I/O registers between the CPU and the UART.
//
// Loads and stores whose address lies in the I/O partition (top nibble
// 4'b1000) reach four word registers, selected by address bits [3:2]:
//   0x80000000  read   {31'b0, DataInReady}   transmitter can take a byte
//   0x80000004  read   {31'b0, DataOutValid}  receiver holds a byte
//   0x80000008  write  {24'b0, DataIn}        byte to transmit
//   0x8000000c  read   {24'b0, DataOut}       received byte
// The CPU does not look at ready or valid itself; software polls the two
// control registers. A store to 0x80000008 raises DataInValid for the one
// cycle of its execute stage with DataIn = store data [7:0]; a load from
// 0x8000000c raises DataOutReady for the one cycle of its execute stage,
// which consumes the byte. Read data is registered at the end of the
// execute stage, so it arrives in the memory stage in the same cycle as a
// block-RAM read would. Writes to read-only registers are ignored; loads
// from the write-only register return 0 (this design's choice).
module io_map
  import mips150_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // from the execute stage
  input  logic        io_read,
  input  logic        io_write,
  input  logic [1:0]  reg_sel,     // address bits [3:2]
  input  logic [31:0] wdata,
  // to the memory stage
  output logic [31:0] rdata,
  // UART transmit side
  output logic [7:0]  uart_data_in,
  output logic        uart_data_in_valid,
  input  logic        uart_data_in_ready,
  // UART receive side
  input  logic [7:0]  uart_data_out,
  input  logic        uart_data_out_valid,
  output logic        uart_data_out_ready
);

  assign uart_data_in        = wdata[7:0];
  assign uart_data_in_valid  = io_write && (reg_sel == IO_TX_DATA);
  assign uart_data_out_ready = io_read && (reg_sel == IO_RX_DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata <= '0;
    end else if (io_read) begin
      unique case (reg_sel)
        IO_TX_CTRL: rdata <= {31'b0, uart_data_in_ready};
        IO_RX_CTRL: rdata <= {31'b0, uart_data_out_valid};
        IO_RX_DATA: rdata <= {24'b0, uart_data_out};
        default:    rdata <= '0;
      endcase
    end
  end

endmodule
