// alu: 32-bit combinational ALU of the MIPS150 CPU.
//
// Computes every arithmetic, logic, comparison and shift result of the
// instruction subset from two operands A and B and a 4-bit operation code
// (mips150_pkg::alu_op_e). Additions and subtractions wrap (no overflow trap,
// as for ADDU/ADDIU/SUBU). SLT compares signed, SLTU unsigned, and both return
// 0 or 1. Shifts move operand B by A[4:0], so the datapath puts the shift
// amount (shamt or rs) on A and the value (rt) on B. LUI returns
// {B[15:0], 16'b0}. The operation set follows the instruction semantics; the
// operand convention and the opcode numbering are this design's own.
// Timing: purely combinational.
module alu
  import mips150_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] result
);

  logic [4:0] shamt;
  assign shamt = a[4:0];

  always_comb begin
    unique case (op)
      ALU_ADDU: result = a + b;
      ALU_SUBU: result = a - b;
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_NOR:  result = ~(a | b);
      ALU_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: result = {31'b0, a < b};
      ALU_SLL:  result = b << shamt;
      ALU_SRL:  result = b >> shamt;
      ALU_SRA:  result = $unsigned($signed(b) >>> shamt);
      ALU_LUI:  result = {b[15:0], 16'b0};
      default:  result = '0;
    endcase
  end

endmodule
