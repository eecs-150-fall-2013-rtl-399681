// alu_dec: ALU controller of the MIPS150 CPU.
//
// Maps an instruction's opcode, and for R-type instructions its funct field,
// to the ALU operation. Loads and stores use ADDU to form base + offset;
// branches and jumps do not use the ALU result and get ADDU. Register-shift
// and immediate-shift variants map to the same shift operation: the operand
// selection (shamt or rs on ALU input A) is made by the main decoder.
// Unknown encodings produce ADDU. Timing: purely combinational.
module alu_dec
  import mips150_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output alu_op_e    alu_op
);

  always_comb begin
    alu_op = ALU_ADDU;
    case (opcode)
      OP_RTYPE: begin
        case (funct)
          FN_SLL, FN_SLLV: alu_op = ALU_SLL;
          FN_SRL, FN_SRLV: alu_op = ALU_SRL;
          FN_SRA, FN_SRAV: alu_op = ALU_SRA;
          FN_SUBU:         alu_op = ALU_SUBU;
          FN_AND:          alu_op = ALU_AND;
          FN_OR:           alu_op = ALU_OR;
          FN_XOR:          alu_op = ALU_XOR;
          FN_NOR:          alu_op = ALU_NOR;
          FN_SLT:          alu_op = ALU_SLT;
          FN_SLTU:         alu_op = ALU_SLTU;
          default:         alu_op = ALU_ADDU;  // ADDU, JR, JALR
        endcase
      end
      OP_SLTI:  alu_op = ALU_SLT;
      OP_SLTIU: alu_op = ALU_SLTU;
      OP_ANDI:  alu_op = ALU_AND;
      OP_ORI:   alu_op = ALU_OR;
      OP_XORI:  alu_op = ALU_XOR;
      OP_LUI:   alu_op = ALU_LUI;
      default:  alu_op = ALU_ADDU;  // ADDIU, loads, stores, branches, jumps
    endcase
  end

endmodule
