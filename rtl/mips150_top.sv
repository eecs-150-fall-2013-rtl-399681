// mips150_top: the MIPS150 system of the first project checkpoint.
//
// The three-stage CPU, with its instruction and data block RAMs, talks to
// the outside world only through a UART on the RS-232 lines. The CPU reaches
// the UART through its memory-mapped I/O registers at 0x80000000-0x8000000c;
// programs are loaded by storing them through the UART-driven software into
// the instruction memory. Interface: clk, synchronous active-high rst, and
// the two serial lines, which connect to the board's RS-232 level shifter.
// CLOCK_FREQ and BAUD_RATE set the serial bit time (CLOCK_FREQ / BAUD_RATE
// cycles per bit); RESET_PC is where fetch starts after reset; the two
// INIT_FILE parameters optionally preload the block RAMs from hex files.
module mips150_top #(
  parameter int unsigned CLOCK_FREQ = 100_000_000,
  parameter int unsigned BAUD_RATE  = 115_200,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter string       IMEM_INIT_FILE = "",   // optional program image ($readmemh)
  parameter string       DMEM_INIT_FILE = ""    // optional data image ($readmemh)
) (
  input  logic clk,
  input  logic rst,
  input  logic serial_in,
  output logic serial_out
);

  logic [7:0] data_in, data_out;
  logic       data_in_valid, data_in_ready, data_out_valid, data_out_ready;

  mips150_cpu #(
    .RESET_PC(RESET_PC), .IMEM_INIT_FILE(IMEM_INIT_FILE), .DMEM_INIT_FILE(DMEM_INIT_FILE)
  ) u_cpu (
    .clk, .rst,
    .uart_data_in        (data_in),
    .uart_data_in_valid  (data_in_valid),
    .uart_data_in_ready  (data_in_ready),
    .uart_data_out       (data_out),
    .uart_data_out_valid (data_out_valid),
    .uart_data_out_ready (data_out_ready)
  );

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_uart (
    .clk, .rst,
    .DataIn       (data_in),
    .DataInValid  (data_in_valid),
    .DataInReady  (data_in_ready),
    .DataOut      (data_out),
    .DataOutValid (data_out_valid),
    .DataOutReady (data_out_ready),
    .SIn          (serial_in),
    .SOut         (serial_out)
  );

endmodule
