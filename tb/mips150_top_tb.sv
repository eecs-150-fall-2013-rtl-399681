// mips150_top_tb: end-to-end test of the MIPS150 system over its serial port.
//
// Runs at the design's default parameters (100 MHz clock, 115200 baud).
// The instruction memory starts with a small loader: it polls the UART
// receive-status register, reads each byte from the receive-data register
// and stores it with SB through address 0x3000_1000 upward, which writes the
// data and the instruction memory at once; after the last byte it jumps
// through a register to 0x1000. The testbench, acting as the host, sends an
// echo program that way, most significant byte of each word first. The
// echo program polls for a received byte, waits for the transmitter to be
// ready and writes the byte back. The testbench then sends a few bytes and
// decodes the serial output, expecting them back in order. It checks the
// downloaded words in both memories, the echoed bytes and the serial frame
// format, and counts forwarding, taken branches, register jumps, stores
// that reach both memories, byte stores and UART transfers, failing if any
// never happened.
module mips150_top_tb;
  import mips150_asm_pkg::*;

  localparam int CLOCK_FREQ = 100_000_000;   // the top's defaults
  localparam int BAUD_RATE  = 115_200;
  localparam int BIT        = CLOCK_FREQ / BAUD_RATE;
  localparam logic [31:0] LOAD_ADDR = 32'h0000_1000;

  logic clk = 0, rst = 1, serial_in = 1, serial_out;
  int checks = 0, failures = 0;

  mips150_top dut (.clk, .rst, .serial_in, .serial_out);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ programs
  logic [31:0] loader [16];
  logic [31:0] echo [14];

  function automatic void build_programs();
    // loader at address 0
    loader[0]  = lui(30, 16'h8000);            // I/O base
    loader[1]  = lui(5, 16'h3000);
    loader[2]  = ori(5, 5, 16'h1000);          // destination 0x3000_1000
    loader[3]  = addiu(6, 0, 4 * $size(echo)); // bytes to receive
    loader[4]  = lw(1, 4, 30);                 // rx_wait: receive status
    loader[5]  = nop();                        // load delay slot
    loader[6]  = beq(1, 0, -3);                // nothing yet: poll again
    loader[7]  = nop();
    loader[8]  = lw(2, 12, 30);                // take the byte
    loader[9]  = addiu(6, 6, -1);              // load delay slot: count down
    loader[10] = sb(2, 0, 5);                  // to both memories
    loader[11] = bne(6, 0, -8);                // more bytes: back to rx_wait
    loader[12] = addiu(5, 5, 1);               // branch delay slot: advance
    loader[13] = addiu(7, 0, LOAD_ADDR);
    loader[14] = jr(7);                        // start the downloaded code
    loader[15] = nop();
    // echo, linked at LOAD_ADDR
    echo[0]  = lui(30, 16'h8000);
    echo[1]  = lw(1, 4, 30);                   // loop: receive status
    echo[2]  = nop();
    echo[3]  = beq(1, 0, -3);
    echo[4]  = nop();
    echo[5]  = lw(2, 12, 30);                  // received byte
    echo[6]  = nop();
    echo[7]  = lw(3, 0, 30);                   // tx_wait: transmitter ready?
    echo[8]  = nop();
    echo[9]  = beq(3, 0, -3);
    echo[10] = nop();
    echo[11] = sw(2, 8, 30);                   // send it
    echo[12] = j(LOAD_ADDR + 4);
    echo[13] = nop();                          // jump delay slot
  endfunction

  // ------------------------------------------------------------ host side
  task automatic send_byte(logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      serial_in = frame[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  logic [7:0] received [$];
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
      checks++;
      if (serial_out !== 1'b1) begin
        failures++;
        $display("FAIL stop bit missing");
      end
      received.push_back(b);
    end
  end

  // ------------------------------------------------------------ event counts
  int n_fwd = 0, n_taken = 0, n_jr = 0, n_dual = 0, n_byte = 0, n_rx = 0, n_tx = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_cpu.fwd_rs || dut.u_cpu.fwd_rt) n_fwd++;
    if (dut.u_cpu.br_taken) n_taken++;
    if (dut.u_cpu.ctrl_x.br_type == mips150_pkg::BR_JR) n_jr++;
    if (dut.u_cpu.imem_we != 0 && dut.u_cpu.dmem_we != 0) n_dual++;
    if (dut.u_cpu.dmem_we inside {4'b1000, 4'b0100, 4'b0010, 4'b0001}) n_byte++;
    if (dut.data_out_valid && dut.data_out_ready) n_rx++;
    if (dut.data_in_valid && dut.data_in_ready) n_tx++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] msg [5] = '{8'h48, 8'h69, 8'h0D, 8'h00, 8'hFF};
    build_programs();
    for (int k = 0; k < 4096; k++) begin
      dut.u_cpu.u_imem.mem[k] = (k < $size(loader)) ? loader[k] : 32'h0;
      dut.u_cpu.u_dmem.mem[k] = 32'h0;
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (100) @(posedge clk);
    // download the echo program, big-endian byte order
    foreach (echo[w])
      for (int b = 3; b >= 0; b--) send_byte(echo[w][8*b +: 8]);
    repeat (4 * BIT) @(posedge clk);
    foreach (echo[w]) begin
      expect_eq(dut.u_cpu.u_imem.mem[LOAD_ADDR[13:2] + w], echo[w], $sformatf("imem word %0d", w));
      expect_eq(dut.u_cpu.u_dmem.mem[LOAD_ADDR[13:2] + w], echo[w], $sformatf("dmem word %0d", w));
    end
    expect_eq(32'(dut.u_cpu.pc_x >= LOAD_ADDR), 1, "running the downloaded program");
    // echo test
    foreach (msg[i]) send_byte(msg[i]);
    repeat (14 * BIT) @(posedge clk);
    expect_eq(32'(received.size()), 32'($size(msg)), "bytes echoed");
    foreach (msg[i]) if (i < received.size()) expect_eq(32'(received[i]), 32'(msg[i]), "echoed byte");
    $display("events: forwards=%0d taken_branches=%0d reg_jumps=%0d dual_stores=%0d byte_stores=%0d uart_rx=%0d uart_tx=%0d",
             n_fwd, n_taken, n_jr, n_dual, n_byte, n_rx, n_tx);
    checks++;
    if (n_fwd == 0 || n_taken == 0 || n_jr == 0 || n_dual == 0 || n_byte == 0 || n_rx == 0 || n_tx == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
