// dmem_blk_ram_tb: self-checking test of the data block RAM.
// Random byte-masked writes and reads over the full 4096-row array against a
// reference array; checks the one-cycle synchronous read latency, the
// read-first behaviour on a write, and the big-endian lane of each mask bit.
module dmem_blk_ram_tb;
  localparam int DEPTH = 4096;
  logic        clk = 0;
  logic [11:0] addra;
  logic [3:0]  wea;
  logic [31:0] dina, douta;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  dmem_blk_ram dut (.clk, .addra, .wea, .dina, .douta);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one access; returns the data read at this edge (old contents)
  task automatic access(logic [11:0] a, logic [3:0] m, logic [31:0] d);
    logic [31:0] old;
    @(negedge clk);
    addra = a; wea = m; dina = d;
    old = ref_mem[a];
    @(posedge clk); #1;
    expect_eq(douta, old, "read-first data");
    for (int b = 0; b < 4; b++) if (m[b]) ref_mem[a][b*8 +: 8] = d[b*8 +: 8];
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wea = 0; addra = 0; dina = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addra = 12'(i); wea = 4'hF; dina = 32'(i) * 32'h0001_0003;
      ref_mem[i] = dina;
    end
    @(negedge clk); wea = 0;
    // byte lane of mask bit 3 is bits [31:24] (offset 00)
    access(12'h001, 4'b1000, 32'hAA00_0000);
    access(12'h001, 4'b0000, 32'h0);
    expect_eq(douta[31:24], 8'hAA, "mask bit 3 lane");
    // latency: the address of edge k is read at edge k
    @(negedge clk); addra = 12'h010; wea = 0;
    @(posedge clk); #1 expect_eq(douta, ref_mem[12'h010], "sync read");
    addra = 12'h020; #1 expect_eq(douta, ref_mem[12'h010], "held until next edge");
    for (int n = 0; n < 3000; n++)
      access(12'($urandom), 4'($urandom), $urandom);
    for (int n = 0; n < 200; n++) access(12'($urandom_range(0, 15)), 4'b0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
