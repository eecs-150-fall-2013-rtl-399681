// uart_receiver: serial receiver with a ready/valid byte output.
//
// The serial input passes two synchronising flip-flops. A falling edge on
// the idle line starts a frame; every bit is sampled once, in the middle of
// its CLOCK_FREQ / BAUD_RATE cycle bit time. A start bit that is high again
// at its middle is taken as a glitch. After eight data bits (least
// significant first) the stop bit is sampled; if it is high the byte is
// placed on data_out and data_out_valid rises. The byte is held until a
// rising edge with data_out_ready high consumes it; a newer byte that
// arrives before then replaces it. Frames with a low stop bit are dropped.
// These are this design's own choices.
module uart_receiver #(
  parameter int unsigned CLOCK_FREQ = 100_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       serial_in,
  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready
);

  localparam int unsigned SYMBOL_CYCLES = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned SAMPLE_CYCLE  = SYMBOL_CYCLES / 2;
  localparam int unsigned CW = $clog2(SYMBOL_CYCLES + 1);

  logic [1:0]    sync;
  logic          rx;
  logic          busy;
  logic [3:0]    bit_idx;       // 0 start, 1..8 data, 9 stop
  logic [CW-1:0] cycle_cnt;
  logic [7:0]    shift;
  logic          sample, frame_ok;

  assign rx       = sync[1];
  assign sample   = busy && (cycle_cnt == CW'(SAMPLE_CYCLE));
  assign frame_ok = sample && (bit_idx == 4'd9) && rx;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      busy      <= 1'b0;
      bit_idx   <= '0;
      cycle_cnt <= '0;
      shift     <= '0;
    end else begin
      sync <= {sync[0], serial_in};
      if (!busy) begin
        if (!rx) begin
          busy      <= 1'b1;
          bit_idx   <= '0;
          cycle_cnt <= '0;
        end
      end else begin
        if (cycle_cnt == CW'(SYMBOL_CYCLES - 1)) begin
          cycle_cnt <= '0;
          bit_idx   <= bit_idx + 4'd1;
        end else begin
          cycle_cnt <= cycle_cnt + CW'(1);
        end
        if (sample) begin
          if (bit_idx == 4'd0 && rx) busy <= 1'b0;        // glitch, not a start bit
          else if (bit_idx >= 4'd1 && bit_idx <= 4'd8) shift <= {rx, shift[7:1]};
          else if (bit_idx == 4'd9) busy <= 1'b0;         // stop bit sampled
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out       <= '0;
      data_out_valid <= 1'b0;
    end else if (frame_ok) begin
      data_out       <= shift;
      data_out_valid <= 1'b1;
    end else if (data_out_ready) begin
      data_out_valid <= 1'b0;
    end
  end

endmodule
