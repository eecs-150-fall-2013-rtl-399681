// uart_transmitter: serial transmitter with a ready/valid byte input.
//
// Sends each accepted byte as one start bit (0), eight data bits least
// significant first, and one stop bit (1), each bit lasting
// CLOCK_FREQ / BAUD_RATE clock cycles. A byte is accepted on a rising edge
// where data_in_valid and data_in_ready are both high; data_in_ready is low
// from then until the stop bit has been sent (10 bit times). The line idles
// high. Frame format and handshake timing are this design's own choices.
module uart_transmitter #(
  parameter int unsigned CLOCK_FREQ = 100_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,
  output logic       serial_out
);

  localparam int unsigned SYMBOL_CYCLES = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned CW = $clog2(SYMBOL_CYCLES + 1);

  logic [9:0]    shift;
  logic [3:0]    bits_left;
  logic [CW-1:0] cycle_cnt;
  logic          busy;

  assign data_in_ready = !busy;
  assign serial_out    = busy ? shift[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      shift     <= '1;
      bits_left <= '0;
      cycle_cnt <= '0;
    end else if (!busy) begin
      if (data_in_valid) begin
        busy      <= 1'b1;
        shift     <= {1'b1, data_in, 1'b0};
        bits_left <= 4'd10;
        cycle_cnt <= '0;
      end
    end else if (cycle_cnt == CW'(SYMBOL_CYCLES - 1)) begin
      cycle_cnt <= '0;
      shift     <= {1'b1, shift[9:1]};
      bits_left <= bits_left - 4'd1;
      if (bits_left == 4'd1) busy <= 1'b0;
    end else begin
      cycle_cnt <= cycle_cnt + CW'(1);
    end
  end

endmodule
