// regfile_tb: self-checking test of the register file.
// Checks that register 0 reads zero and ignores writes, that a write is
// visible right after its clock edge, that we gates writes, that reads are
// asynchronous (valid one time unit after the address changes), and runs
// random reads and writes against a reference array.
module regfile_tb;
  logic        clk = 0;
  logic        we;
  logic [4:0]  wa, ra1, ra2;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] ref_regs [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .we, .wa, .wd, .ra1, .ra2, .rd1, .rd2);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(logic [4:0] a, logic [31:0] d, logic en);
    @(negedge clk);
    we = en; wa = a; wd = d;
    @(posedge clk);
    #1;
    we = 0;
    if (en && a != 0) ref_regs[a] = d;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 32; i++) ref_regs[i] = 0;
    // initialise every register
    for (int i = 1; i < 32; i++) write(5'(i), 32'h1000_0000 + i, 1'b1);
    // register 0 is not writable
    write(5'd0, 32'hDEAD_BEEF, 1'b1);
    ra1 = 0; ra2 = 0; #1;
    expect_eq(rd1, 32'd0, "r0 port1");
    expect_eq(rd2, 32'd0, "r0 port2");
    // write visible right after the edge
    @(negedge clk); we = 1; wa = 5'd7; wd = 32'hCAFE_F00D; ra1 = 5'd7;
    #1 expect_eq(rd1, 32'h1000_0007, "before edge");
    @(posedge clk); #1; we = 0; ref_regs[7] = 32'hCAFE_F00D;
    expect_eq(rd1, 32'hCAFE_F00D, "after edge");
    // we low: no write
    write(5'd9, 32'h1234_5678, 1'b0);
    ra2 = 5'd9; #1 expect_eq(rd2, 32'h1000_0009, "we low");
    // asynchronous read
    ra1 = 5'd3; #1 expect_eq(rd1, 32'h1000_0003, "async read");
    // random traffic
    for (int n = 0; n < 500; n++) begin
      write(5'($urandom), $urandom, 1'($urandom));
      ra1 = 5'($urandom); ra2 = 5'($urandom); #1;
      expect_eq(rd1, ref_regs[ra1], "random port1");
      expect_eq(rd2, ref_regs[ra2], "random port2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
