// mips150_asmtest_tb: per-instruction assembly test of the full system.
//
// A directed test program in the usual style of a processor bring-up test:
// for every instruction it computes a value with that instruction, loads the
// expected value (worked out here in SystemVerilog) into a reference
// register, counts the test number up in $23 and branches to an error
// handler on a mismatch. Besides all arithmetic, logic and shift
// instructions it checks big-endian byte and halfword stores and loads,
// taken and not-taken branches with their delay slots, J/JAL/JR/JALR with
// their link values, back-to-back dependent instructions (forwarding), the
// address partitions (a store to the instruction-memory range does not reach
// the data memory; a store to 0x3... reaches both), and code written into
// the instruction memory by stores and then executed. At the end the program
// sends 'P' over the serial line; the error handler sends the failing test
// number instead. The testbench decodes the serial output and expects 'P'
// and the expected number of tests. Runs at the system's default parameters.
module mips150_asmtest_tb;
  import mips150_asm_pkg::*;

  localparam int BIT = 100_000_000 / 115_200;   // the top's default bit time
  localparam int ERR_IDX  = 1000;                // error handler
  localparam int DONE_IDX = 1100;                // success handler

  logic clk = 0, rst = 1, serial_in = 1, serial_out;
  int checks = 0, failures = 0;

  mips150_top dut (.clk, .rst, .serial_in, .serial_out);

  always #5 clk = ~clk;

  logic [31:0] prog [4096];
  int pc_idx = 0;
  int ntests = 0;

  function automatic void emit(logic [31:0] w);
    prog[pc_idx] = w;
    pc_idx++;
  endfunction

  function automatic void li(int r, logic [31:0] v);
    emit(lui(r, v[31:16]));
    emit(ori(r, r, v[15:0]));
  endfunction

  // compare $8 with an expected value; branch to the error handler if not equal
  function automatic void check8(logic [31:0] exp);
    li(16, exp);
    emit(addiu(23, 23, 1));
    emit(bne(8, 16, ERR_IDX - (pc_idx + 1)));
    emit(nop());
    ntests++;
  endfunction

  function automatic void rr(logic [31:0] w, logic [31:0] a, logic [31:0] b, logic [31:0] exp);
    li(9, a); li(10, b);
    emit(w);
    check8(exp);
  endfunction

  // branch test: $8 = 1 if taken (delay slot runs, next skipped), 3 if not
  function automatic void br(logic [31:0] w, logic [31:0] a, logic [31:0] b, bit taken);
    li(9, a); li(10, b);
    emit(addiu(8, 0, 0));
    emit(w);                    // offset 2: skip one instruction after the delay slot
    emit(addiu(8, 8, 1));       // delay slot
    emit(addiu(8, 8, 2));       // skipped when taken
    check8(taken ? 1 : 3);
  endfunction

  function automatic void build();
    logic [31:0] a, b;
    for (int k = 0; k < 4096; k++) prog[k] = 32'h0;
    emit(addiu(23, 0, 0));
    a = 32'h8765_4321; b = 32'h0000_0013;
    rr(addu(8, 9, 10), a, b, a + b);
    rr(subu(8, 9, 10), a, b, a - b);
    rr(and_(8, 9, 10), a, 32'hF0F0_FFFF, a & 32'hF0F0_FFFF);
    rr(or_(8, 9, 10),  a, 32'h0F00_0F00, a | 32'h0F00_0F00);
    rr(xor_(8, 9, 10), a, 32'hFFFF_0000, a ^ 32'hFFFF_0000);
    rr(nor_(8, 9, 10), a, 32'h0000_FFFF, ~(a | 32'h0000_FFFF));
    rr(slt(8, 9, 10),  a, b, 1);            // negative < positive
    rr(sltu(8, 9, 10), a, b, 0);            // unsigned: larger
    rr(sllv(8, 9, 10), a, b, a << 19);
    rr(srlv(8, 9, 10), a, b, a >> 19);
    rr(srav(8, 9, 10), a, b, 32'hFFFF_F0EC); // 0x87654321 >>> 19
    rr(sll(8, 9, 4),   a, b, a << 4);
    rr(srl(8, 9, 8),   a, b, a >> 8);
    rr(sra(8, 9, 8),   a, b, 32'hFF87_6543);
    rr(addiu(8, 9, -2), a, b, a - 2);
    rr(slti(8, 9, 5),   a, b, 1);
    rr(sltiu(8, 9, -1), a, b, 1);           // 0x8765_4321 < 0xFFFF_FFFF unsigned
    rr(andi(8, 9, 16'hFF0F), a, b, a & 32'h0000_FF0F);
    rr(ori(8, 9, 16'h8000),  a, b, a | 32'h0000_8000);
    rr(xori(8, 9, 16'hFFFF), a, b, a ^ 32'h0000_FFFF);
    rr(lui(8, 16'hBEEF),     a, b, 32'hBEEF_0000);
    // forwarding: each instruction uses the one before it
    emit(addiu(8, 0, 5));
    emit(addu(8, 8, 8));
    emit(sll(8, 8, 2));
    emit(subu(8, 8, 8 - 8 + 8));              // $8 - $8 = 0
    emit(ori(8, 8, 16'h1234));
    check8(32'h0000_1234);
    // memory: word, byte and halfword, big-endian lanes
    li(20, 32'h1000_0100);
    li(9, 32'hA1B2_C3D4);
    emit(sw(9, 0, 20));
    emit(lw(8, 0, 20));
    emit(nop());                             // load delay slot
    check8(32'hA1B2_C3D4);
    emit(lbu(8, 0, 20)); emit(nop()); check8(32'h0000_00A1);
    emit(lb(8, 0, 20));  emit(nop()); check8(32'hFFFF_FFA1);
    emit(lbu(8, 3, 20)); emit(nop()); check8(32'h0000_00D4);
    emit(lb(8, 2, 20));  emit(nop()); check8(32'hFFFF_FFC3);
    emit(lhu(8, 0, 20)); emit(nop()); check8(32'h0000_A1B2);
    emit(lh(8, 2, 20));  emit(nop()); check8(32'hFFFF_C3D4);
    emit(lh(8, 0, 20));  emit(nop()); check8(32'hFFFF_A1B2);
    li(9, 32'h0000_0055);
    emit(sb(9, 1, 20));
    emit(lw(8, 0, 20)); emit(nop()); check8(32'hA155_C3D4);
    li(9, 32'h0000_6677);
    emit(sh(9, 2, 20));
    emit(lw(8, 0, 20)); emit(nop()); check8(32'hA155_6677);
    // address partitions
    li(21, 32'h2000_0100);                   // same word, instruction memory only
    li(9, 32'h1111_1111);
    emit(sw(9, 0, 21));
    emit(lw(8, 0, 20)); emit(nop()); check8(32'hA155_6677);
    li(22, 32'h3000_0104);                   // both memories
    li(9, 32'h2222_3333);
    emit(sw(9, 0, 22));
    emit(lw(8, 4, 20)); emit(nop()); check8(32'h2222_3333);
    // branches
    br(beq(9, 10, 2), 32'd7, 32'd7, 1);
    br(beq(9, 10, 2), 32'd7, 32'd8, 0);
    br(bne(9, 10, 2), 32'd7, 32'd8, 1);
    br(bne(9, 10, 2), 32'd7, 32'd7, 0);
    br(blez(9, 2), 32'd0, 0, 1);
    br(blez(9, 2), 32'hFFFF_FFFF, 0, 1);
    br(blez(9, 2), 32'd1, 0, 0);
    br(bgtz(9, 2), 32'd1, 0, 1);
    br(bgtz(9, 2), 32'd0, 0, 0);
    br(bltz(9, 2), 32'h8000_0000, 0, 1);
    br(bltz(9, 2), 32'd0, 0, 0);
    br(bgez(9, 2), 32'd0, 0, 1);
    br(bgez(9, 2), 32'hFFFF_FFFE, 0, 0);
    // J: delay slot runs, next instruction skipped
    emit(addiu(8, 0, 0));
    emit(j((pc_idx + 3) * 4));
    emit(addiu(8, 8, 1));
    emit(addiu(8, 8, 2));
    check8(1);
    // JAL: link is the address after the delay slot
    begin
      int at = pc_idx;
      emit(jal((at + 3) * 4));
      emit(addiu(8, 0, 1));
      emit(addiu(8, 8, 2));
      check8(1);
      emit(addu(8, 31, 0)); check8((at + 2) * 4);
    end
    // JR through a register that was just written (forwarded)
    begin
      int at = pc_idx;
      emit(addiu(11, 0, (at + 4) * 4));
      emit(jr(11));
      emit(addiu(8, 0, 1));
      emit(addiu(8, 8, 2));
      check8(1);
    end
    // JALR with link to $12
    begin
      int at = pc_idx;
      emit(addiu(11, 0, (at + 4) * 4));
      emit(jalr(12, 11));
      emit(addiu(8, 0, 1));
      emit(addiu(8, 8, 2));
      check8(1);
      emit(addu(8, 12, 0)); check8((at + 3) * 4);
    end
    // store code into the instruction memory, then call it
    li(24, 32'h2000_0000 + 32'h0000_0C00);    // instruction word 0x300
    li(9, addiu(8, 0, 16'h0777)); emit(sw(9, 0, 24));
    li(9, jr(31));                emit(sw(9, 4, 24));
    li(9, nop());                 emit(sw(9, 8, 24));
    emit(addiu(8, 0, 0));
    emit(jal(32'h0000_0C00));
    emit(nop());
    check8(32'h0000_0777);
    // writes to $0 are ignored
    emit(addiu(0, 0, 99));
    emit(addu(8, 0, 0));
    check8(0);
    // all passed
    emit(j(DONE_IDX * 4));
    emit(nop());
    // error handler: send the test number
    pc_idx = ERR_IDX;
    emit(lui(30, 16'h8000));
    emit(lw(3, 0, 30));
    emit(nop());
    emit(beq(3, 0, -3));
    emit(nop());
    emit(sw(23, 8, 30));
    emit(j(pc_idx * 4));
    emit(nop());
    // success handler: send the test count, then 'P'
    pc_idx = DONE_IDX;
    emit(lui(30, 16'h8000));
    emit(lw(3, 0, 30));
    emit(nop());
    emit(beq(3, 0, -3));
    emit(nop());
    emit(sw(23, 8, 30));
    emit(addiu(4, 0, 8'h50));
    emit(lw(3, 0, 30));
    emit(nop());
    emit(beq(3, 0, -3));
    emit(nop());
    emit(sw(4, 8, 30));
    emit(j(pc_idx * 4));
    emit(nop());
  endfunction

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
      received.push_back(b);
    end
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    for (int k = 0; k < 4096; k++) begin
      dut.u_cpu.u_imem.mem[k] = prog[k];
      dut.u_cpu.u_dmem.mem[k] = 32'h0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (received.size() >= 2 || (received.size() == 1 && received[0] != 8'(ntests)));
    repeat (10) @(posedge clk);
    checks++;
    if (received.size() < 2 || received[0] != 8'(ntests) || received[1] != 8'h50) begin
      failures++;
      $display("FAIL: serial output reports test %0d (of %0d)", received[0], ntests);
    end
    checks++;
    if (ntests < 50) begin
      failures++;
      $display("FAIL: only %0d tests built", ntests);
    end
    $display("asmtest: %0d tests passed", ntests);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
