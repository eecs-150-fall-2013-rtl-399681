// control: main instruction decoder of the MIPS150 CPU.
//
// Turns a 32-bit instruction word into the control bundle ctrl_t that the
// execute stage uses and that is carried to the write-back stage: which
// register is written (rt, rd or $31), ALU operand selects (rs or shamt on
// A; rt, sign- or zero-extended immediate on B), write-back source (ALU,
// PC+8 link value or memory), memory access direction, width and sign, and
// the branch/jump kind. Encodings follow the MIPS150 instruction table.
// Anything outside the subset is flagged `illegal` and decoded as a no-op
// (no register or memory write, no branch); that behaviour is this
// design's own choice. Timing: purely combinational.
module control
  import mips150_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  logic [5:0] opcode, funct;
  logic [4:0] rt;
  assign opcode = instr[31:26];
  assign rt     = instr[20:16];
  assign funct  = instr[5:0];

  always_comb begin
    ctrl = '{reg_write: 1'b0, dst_sel: DST_RT, a_sel: A_RS, b_sel: B_RT,
             wb_sel: WB_ALU, mem_read: 1'b0, mem_write: 1'b0,
             mem_size: SZ_WORD, mem_unsigned: 1'b0, br_type: BR_NONE,
             illegal: 1'b0};
    case (opcode)
      OP_RTYPE: begin
        ctrl.dst_sel = DST_RD;
        case (funct)
          FN_SLL, FN_SRL, FN_SRA: begin
            ctrl.reg_write = 1'b1;
            ctrl.a_sel     = A_SHAMT;
          end
          FN_SLLV, FN_SRLV, FN_SRAV, FN_ADDU, FN_SUBU, FN_AND, FN_OR,
          FN_XOR, FN_NOR, FN_SLT, FN_SLTU:
            ctrl.reg_write = 1'b1;
          FN_JR:
            ctrl.br_type = BR_JR;
          FN_JALR: begin
            ctrl.br_type   = BR_JR;
            ctrl.reg_write = 1'b1;
            ctrl.wb_sel    = WB_PC8;
          end
          default: ctrl.illegal = 1'b1;
        endcase
      end
      OP_REGIMM: begin
        if (rt == RT_BLTZ)      ctrl.br_type = BR_LTZ;
        else if (rt == RT_BGEZ) ctrl.br_type = BR_GEZ;
        else                    ctrl.illegal = 1'b1;
      end
      OP_J:   ctrl.br_type = BR_J;
      OP_JAL: begin
        ctrl.br_type   = BR_J;
        ctrl.reg_write = 1'b1;
        ctrl.dst_sel   = DST_RA;
        ctrl.wb_sel    = WB_PC8;
      end
      OP_BEQ:  ctrl.br_type = BR_EQ;
      OP_BNE:  ctrl.br_type = BR_NE;
      OP_BLEZ: ctrl.br_type = BR_LEZ;
      OP_BGTZ: ctrl.br_type = BR_GTZ;
      OP_ADDIU, OP_SLTI, OP_SLTIU: begin
        ctrl.reg_write = 1'b1;
        ctrl.b_sel     = B_SEXT;
      end
      OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.b_sel     = B_ZEXT;
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl.reg_write    = 1'b1;
        ctrl.b_sel        = B_SEXT;
        ctrl.wb_sel       = WB_MEM;
        ctrl.mem_read     = 1'b1;
        ctrl.mem_unsigned = (opcode == OP_LBU) || (opcode == OP_LHU);
        ctrl.mem_size     = (opcode == OP_LW) ? SZ_WORD :
                            (opcode == OP_LH || opcode == OP_LHU) ? SZ_HALF : SZ_BYTE;
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.b_sel     = B_SEXT;
        ctrl.mem_write = 1'b1;
        ctrl.mem_size  = (opcode == OP_SW) ? SZ_WORD :
                         (opcode == OP_SH) ? SZ_HALF : SZ_BYTE;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

endmodule
