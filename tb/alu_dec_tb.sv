// alu_dec_tb: self-checking test of the ALU controller.
// Walks every instruction of the MIPS150 subset (opcode, funct) and checks
// the ALU operation it selects against a table written from the ISA.
module alu_dec_tb;
  import mips150_pkg::*;

  logic [5:0] opcode, funct;
  alu_op_e    alu_op;
  int checks = 0, failures = 0;

  alu_dec dut (.opcode, .funct, .alu_op);

  task automatic check(logic [5:0] oc, logic [5:0] fn, alu_op_e exp, string name);
    opcode = oc; funct = fn;
    #1;
    checks++;
    if (alu_op !== exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", name, alu_op.name(), exp.name());
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
    check(6'b000000, 6'b000000, ALU_SLL,  "SLL");
    check(6'b000000, 6'b000010, ALU_SRL,  "SRL");
    check(6'b000000, 6'b000011, ALU_SRA,  "SRA");
    check(6'b000000, 6'b000100, ALU_SLL,  "SLLV");
    check(6'b000000, 6'b000110, ALU_SRL,  "SRLV");
    check(6'b000000, 6'b000111, ALU_SRA,  "SRAV");
    check(6'b000000, 6'b100001, ALU_ADDU, "ADDU");
    check(6'b000000, 6'b100011, ALU_SUBU, "SUBU");
    check(6'b000000, 6'b100100, ALU_AND,  "AND");
    check(6'b000000, 6'b100101, ALU_OR,   "OR");
    check(6'b000000, 6'b100110, ALU_XOR,  "XOR");
    check(6'b000000, 6'b100111, ALU_NOR,  "NOR");
    check(6'b000000, 6'b101010, ALU_SLT,  "SLT");
    check(6'b000000, 6'b101011, ALU_SLTU, "SLTU");
    check(6'b001001, 6'b010101, ALU_ADDU, "ADDIU");
    check(6'b001010, 6'b000011, ALU_SLT,  "SLTI");
    check(6'b001011, 6'b000011, ALU_SLTU, "SLTIU");
    check(6'b001100, 6'b000011, ALU_AND,  "ANDI");
    check(6'b001101, 6'b000011, ALU_OR,   "ORI");
    check(6'b001110, 6'b000011, ALU_XOR,  "XORI");
    check(6'b001111, 6'b000011, ALU_LUI,  "LUI");
    check(6'b100000, 6'b100111, ALU_ADDU, "LB");
    check(6'b100011, 6'b101010, ALU_ADDU, "LW");
    check(6'b100101, 6'b000011, ALU_ADDU, "LHU");
    check(6'b101000, 6'b000010, ALU_ADDU, "SB");
    check(6'b101011, 6'b000110, ALU_ADDU, "SW");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
