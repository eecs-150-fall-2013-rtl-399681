// control_tb: self-checking test of the main decoder.
// Decodes one encoding of every instruction of the MIPS150 subset (random
// register fields) plus some encodings outside it, and compares each field
// of the control bundle with a table written from the ISA.
module control_tb;
  import mips150_pkg::*;

  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control dut (.instr, .ctrl);

  function automatic logic [31:0] r(logic [5:0] fn);
    return {6'b0, 5'($urandom), 5'($urandom), 5'($urandom), 5'($urandom), fn};
  endfunction
  function automatic logic [31:0] i(logic [5:0] oc);
    return {oc, 5'($urandom), 5'($urandom), 16'($urandom)};
  endfunction

  task automatic check(string name, logic [31:0] w, logic rw, dst_sel_e dst,
                       alu_a_sel_e as, alu_b_sel_e bs, wb_sel_e wb, logic mr,
                       logic mw, mem_size_e sz, logic un, br_type_e br, logic ill);
    ctrl_t exp;
    exp = '{reg_write: rw, dst_sel: dst, a_sel: as, b_sel: bs, wb_sel: wb,
            mem_read: mr, mem_write: mw, mem_size: sz, mem_unsigned: un,
            br_type: br, illegal: ill};
    instr = w;
    #1;
    checks++;
    // fields that do not matter for an instruction are compared too: the
    // decoder must leave them at their no-op values
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s: got %p expected %p", name, ctrl, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      check("SLL",  r(6'b000000), 1, DST_RD, A_SHAMT, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("SRL",  r(6'b000010), 1, DST_RD, A_SHAMT, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("SRA",  r(6'b000011), 1, DST_RD, A_SHAMT, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("SLLV", r(6'b000100), 1, DST_RD, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("SRAV", r(6'b000111), 1, DST_RD, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("ADDU", r(6'b100001), 1, DST_RD, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("SLTU", r(6'b101011), 1, DST_RD, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("NOR",  r(6'b100111), 1, DST_RD, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("JR",   r(6'b001000), 0, DST_RD, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_JR, 0);
      check("JALR", r(6'b001001), 1, DST_RD, A_RS, B_RT, WB_PC8, 0, 0, SZ_WORD, 0, BR_JR, 0);
      check("J",    i(6'b000010), 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_J, 0);
      check("JAL",  i(6'b000011), 1, DST_RA, A_RS, B_RT, WB_PC8, 0, 0, SZ_WORD, 0, BR_J, 0);
      check("BEQ",  i(6'b000100), 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_EQ, 0);
      check("BNE",  i(6'b000101), 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NE, 0);
      check("BLEZ", i(6'b000110), 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_LEZ, 0);
      check("BGTZ", i(6'b000111), 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_GTZ, 0);
      check("BLTZ", {6'b000001, 5'($urandom), 5'b00000, 16'($urandom)}, 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_LTZ, 0);
      check("BGEZ", {6'b000001, 5'($urandom), 5'b00001, 16'($urandom)}, 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_GEZ, 0);
      check("ADDIU", i(6'b001001), 1, DST_RT, A_RS, B_SEXT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("SLTI",  i(6'b001010), 1, DST_RT, A_RS, B_SEXT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("SLTIU", i(6'b001011), 1, DST_RT, A_RS, B_SEXT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("ANDI",  i(6'b001100), 1, DST_RT, A_RS, B_ZEXT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("ORI",   i(6'b001101), 1, DST_RT, A_RS, B_ZEXT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("XORI",  i(6'b001110), 1, DST_RT, A_RS, B_ZEXT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("LUI",   i(6'b001111), 1, DST_RT, A_RS, B_ZEXT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 0);
      check("LB",  i(6'b100000), 1, DST_RT, A_RS, B_SEXT, WB_MEM, 1, 0, SZ_BYTE, 0, BR_NONE, 0);
      check("LH",  i(6'b100001), 1, DST_RT, A_RS, B_SEXT, WB_MEM, 1, 0, SZ_HALF, 0, BR_NONE, 0);
      check("LW",  i(6'b100011), 1, DST_RT, A_RS, B_SEXT, WB_MEM, 1, 0, SZ_WORD, 0, BR_NONE, 0);
      check("LBU", i(6'b100100), 1, DST_RT, A_RS, B_SEXT, WB_MEM, 1, 0, SZ_BYTE, 1, BR_NONE, 0);
      check("LHU", i(6'b100101), 1, DST_RT, A_RS, B_SEXT, WB_MEM, 1, 0, SZ_HALF, 1, BR_NONE, 0);
      check("SB",  i(6'b101000), 0, DST_RT, A_RS, B_SEXT, WB_ALU, 0, 1, SZ_BYTE, 0, BR_NONE, 0);
      check("SH",  i(6'b101001), 0, DST_RT, A_RS, B_SEXT, WB_ALU, 0, 1, SZ_HALF, 0, BR_NONE, 0);
      check("SW",  i(6'b101011), 0, DST_RT, A_RS, B_SEXT, WB_ALU, 0, 1, SZ_WORD, 0, BR_NONE, 0);
      // outside the subset: ADDI, MULT, LWL
      check("ADDI", i(6'b001000), 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 1);
      check("MULT", r(6'b011000), 0, DST_RD, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 1);
      check("LWL",  i(6'b100010), 0, DST_RT, A_RS, B_RT, WB_ALU, 0, 0, SZ_WORD, 0, BR_NONE, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
