// io_map_tb: self-checking test of the memory-mapped I/O registers.
// Drives execute-stage loads and stores at the four I/O addresses with
// random UART status, and checks the one-cycle DataInValid / DataOutReady
// strobes, the transmitted byte, and the read data registered for the next
// cycle: {31'b0, DataInReady}, {31'b0, DataOutValid}, {24'b0, DataOut}.
module io_map_tb;
  logic        clk = 0, rst;
  logic        io_read, io_write;
  logic [1:0]  reg_sel;
  logic [31:0] wdata, rdata;
  logic [7:0]  tx_data, rx_data;
  logic        tx_valid, tx_ready, rx_valid, rx_ready;
  int checks = 0, failures = 0;

  io_map dut (.clk, .rst, .io_read, .io_write, .reg_sel, .wdata, .rdata,
              .uart_data_in(tx_data), .uart_data_in_valid(tx_valid),
              .uart_data_in_ready(tx_ready), .uart_data_out(rx_data),
              .uart_data_out_valid(rx_valid), .uart_data_out_ready(rx_ready));

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; io_read = 0; io_write = 0; reg_sel = 0; wdata = 0;
    tx_ready = 0; rx_valid = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] exp_rd;
      logic        rd, wr;
      @(negedge clk);
      rd = 1'($urandom); wr = !rd && 1'($urandom);
      io_read = rd; io_write = wr; reg_sel = 2'($urandom); wdata = $urandom;
      tx_ready = 1'($urandom); rx_valid = 1'($urandom); rx_data = 8'($urandom);
      #1;
      expect_eq(32'(tx_valid), 32'(wr && reg_sel == 2), "DataInValid");
      expect_eq(32'(rx_ready), 32'(rd && reg_sel == 3), "DataOutReady");
      if (tx_valid) expect_eq(32'(tx_data), 32'(wdata[7:0]), "DataIn");
      case (reg_sel)
        0: exp_rd = {31'b0, tx_ready};
        1: exp_rd = {31'b0, rx_valid};
        3: exp_rd = {24'b0, rx_data};
        default: exp_rd = 0;
      endcase
      @(posedge clk); #1;
      if (rd) expect_eq(rdata, exp_rd, "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
