// mips150_echo_tb: the serial echo program run from a preloaded memory image.
//
// The instruction memory is initialised from tb/echo.hex through the top's
// IMEM_INIT_FILE parameter, as an FPGA build would initialise its block
// RAM. The image holds a 14-instruction polling echo loop linked at address
// 0 (receive status, receive data, transmit status, transmit data). The
// testbench first checks the image against the same program written with
// the instruction encoders, then sends bytes on the serial input at
// 115200 baud and expects each one back on the serial output, in order, and
// within two frame times of the end of the frame that delivered it.
module mips150_echo_tb;
  import mips150_asm_pkg::*;

  localparam int BIT = 100_000_000 / 115_200;

  logic clk = 0, rst = 1, serial_in = 1, serial_out;
  int checks = 0, failures = 0;
  int cyc = 0;

  mips150_top #(.IMEM_INIT_FILE("tb/echo.hex")) dut (.clk, .rst, .serial_in, .serial_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic send_byte(logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      serial_in = frame[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  logic [7:0] received [$];
  int         recv_time [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge serial_out);
      repeat (BIT / 2) @(posedge clk);
      if (serial_out !== 1'b0) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = serial_out;
      end
      repeat (BIT) @(posedge clk);
      received.push_back(b);
      recv_time.push_back(cyc);
    end
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_prog [14];
    logic [7:0]  msg [6];
    int          sent_time [6];
    expect_prog = '{lui(30, 16'h8000), lw(1, 4, 30), nop(), beq(1, 0, -3), nop(),
                    lw(2, 12, 30), nop(), lw(3, 0, 30), nop(), beq(3, 0, -3), nop(),
                    sw(2, 8, 30), j(32'h4), nop()};
    msg = '{8'h65, 8'h63, 8'h68, 8'h6F, 8'h0A, 8'h80};
    #1;   // after the memory has read its image
    foreach (expect_prog[k]) expect_eq(dut.u_cpu.u_imem.mem[k], expect_prog[k], $sformatf("image word %0d", k));
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (50) @(posedge clk);
    foreach (msg[i]) begin
      send_byte(msg[i]);
      sent_time[i] = cyc;
      repeat (2 * BIT) @(posedge clk);   // idle gap between frames
    end
    repeat (14 * BIT) @(posedge clk);
    expect_eq(32'(received.size()), 32'($size(msg)), "bytes echoed");
    foreach (msg[i]) if (i < received.size()) begin
      expect_eq(32'(received[i]), 32'(msg[i]), "echoed byte");
      // the echoed frame (10 bits) ends within 2 frame times of the input frame
      expect_eq(32'(recv_time[i] - sent_time[i] < 20 * BIT), 1, "echo latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
