// uart_tb: self-checking test of the UART at its default rate.
// The testbench plays the remote serial port: it sends random bytes on SIn
// with its own bit timing (CLOCK_FREQ / BAUD_RATE cycles per bit) and
// decodes SOut by sampling mid-bit. It checks each received byte and the
// DataOutValid hold-until-ready rule, each transmitted byte, the frame
// length (10 bit times, start 0 and stop 1) and that DataInReady is low
// while a frame is being sent.
module uart_tb;
  localparam int CLOCK_FREQ = 100_000_000;   // must match the UART defaults
  localparam int BAUD_RATE  = 115_200;
  localparam int BIT = CLOCK_FREQ / BAUD_RATE;

  logic       clk = 0, rst;
  logic [7:0] DataIn, DataOut;
  logic       DataInValid, DataInReady, DataOutValid, DataOutReady;
  logic       SIn, SOut;
  int checks = 0, failures = 0;

  uart dut (.*);   // default parameters: 100 MHz, 115200 baud

  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic send_serial(logic [7:0] b);
    logic [9:0] frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      SIn = frame[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; SIn = 1; DataIn = 0; DataInValid = 0; DataOutReady = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    // ---------------- receive
    for (int n = 0; n < 8; n++) begin
      logic [7:0] b;
      b = (n == 0) ? 8'hA5 : 8'($urandom);
      send_serial(b);
      repeat (BIT) @(posedge clk);
      expect_eq(int'(DataOutValid), 1, "DataOutValid after frame");
      expect_eq(int'(DataOut), int'(b), "received byte");
      repeat (20) @(posedge clk);
      expect_eq(int'(DataOutValid), 1, "valid held until ready");
      @(negedge clk) DataOutReady = 1;
      @(negedge clk) DataOutReady = 0;
      expect_eq(int'(DataOutValid), 0, "valid cleared by ready");
    end
    // ---------------- transmit
    for (int n = 0; n < 8; n++) begin
      logic [7:0] b;
      logic [7:0] got;
      int t_accept;
      b = (n == 0) ? 8'h3C : 8'($urandom);
      expect_eq(int'(DataInReady), 1, "ready when idle");
      @(negedge clk) begin DataIn = b; DataInValid = 1; end
      @(negedge clk) DataInValid = 0;
      t_accept = cyc;   // edges counted up to and including the accepting one
      expect_eq(int'(DataInReady), 0, "busy while sending");
      expect_eq(int'(SOut), 0, "start bit right after acceptance");
      repeat (BIT / 2) @(posedge clk);
      expect_eq(int'(SOut), 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        got[i] = SOut;
      end
      repeat (BIT) @(posedge clk);
      expect_eq(int'(SOut), 1, "stop bit");
      expect_eq(int'(got), int'(b), "transmitted byte");
      @(negedge clk);
      while (!DataInReady) @(negedge clk);
      // ready returns 10 bit times after the byte was accepted
      expect_eq(cyc - t_accept, 10 * BIT, "frame length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
