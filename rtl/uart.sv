// uart: full-duplex serial port with ready/valid byte interfaces.
//
// Pairs a transmitter and a receiver (8 data bits, no parity, one stop bit,
// BAUD_RATE bits per second from a CLOCK_FREQ clock). The CPU side uses the
// port names of the memory map: DataIn / DataInValid / DataInReady send a
// byte, DataOut / DataOutValid / DataOutReady deliver a received byte. Each
// transfer happens on a rising edge where valid and ready are both high.
// The baud rate default is the serial rate the system's console uses; the
// clock frequency default is an assumption about the board clock.
module uart #(
  parameter int unsigned CLOCK_FREQ = 100_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] DataIn,
  input  logic       DataInValid,
  output logic       DataInReady,
  output logic [7:0] DataOut,
  output logic       DataOutValid,
  input  logic       DataOutReady,
  input  logic       SIn,
  output logic       SOut
);

  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_tx (
    .clk, .rst,
    .data_in       (DataIn),
    .data_in_valid (DataInValid),
    .data_in_ready (DataInReady),
    .serial_out    (SOut)
  );

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_rx (
    .clk, .rst,
    .serial_in      (SIn),
    .data_out       (DataOut),
    .data_out_valid (DataOutValid),
    .data_out_ready (DataOutReady)
  );

endmodule
