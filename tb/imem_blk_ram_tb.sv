// imem_blk_ram_tb: self-checking test of the instruction block RAM.
// Byte-masked writes on port A interleaved with reads on port B at other
// addresses, against a reference array; checks the one-cycle read latency
// of port B and the big-endian lane of each write-mask bit.
module imem_blk_ram_tb;
  localparam int DEPTH = 4096;
  logic        clk = 0;
  logic [11:0] addra, addrb;
  logic [3:0]  wea;
  logic [31:0] dina, doutb;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  imem_blk_ram dut (.clk, .addra, .wea, .dina, .addrb, .doutb);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wea = 0; addra = 0; addrb = 0; dina = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addra = 12'(i); wea = 4'hF; dina = ~(32'(i) * 32'h0003_0005);
      ref_mem[i] = dina;
    end
    @(negedge clk); wea = 4'b0001; addra = 12'h005; dina = 32'h1122_3344;
    ref_mem[5][7:0] = 8'h44;
    @(negedge clk); wea = 0; addrb = 12'h005;
    @(posedge clk); #1 expect_eq(doutb, ref_mem[5], "mask bit 0 lane [7:0]");
    addrb = 12'h006; #1 expect_eq(doutb, ref_mem[5], "held until next edge");
    for (int n = 0; n < 3000; n++) begin
      logic [11:0] ra, wa;
      @(negedge clk);
      ra = 12'($urandom); wa = 12'($urandom);
      if (wa == ra) wa = wa + 1;
      addrb = ra; addra = wa; wea = 4'($urandom); dina = $urandom;
      @(posedge clk); #1;
      expect_eq(doutb, ref_mem[ra], "random read");
      for (int b = 0; b < 4; b++) if (wea[b]) ref_mem[wa][b*8 +: 8] = dina[b*8 +: 8];
    end
    @(negedge clk); wea = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); addrb = 12'($urandom);
      @(posedge clk); #1 expect_eq(doutb, ref_mem[addrb], "final read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
