// branch_unit: branch and jump resolution of the MIPS150 CPU.
//
// Given the branch kind decoded from the instruction in the execute stage,
// its PC and the (forwarded) rs and rt values, decides whether control is
// transferred and where to:
//   J/JAL     {PC[31:28], target, 2'b00}  (upper bits of the jump's own PC)
//   JR/JALR   rs
//   BEQ..BGEZ PC + 4 + (SEXT(imm) << 2) when the condition holds
// BLEZ/BGTZ/BLTZ/BGEZ compare rs as a signed number with zero. The CPU
// applies the decision after the one architected delay slot. Timing: purely
// combinational.
module branch_unit
  import mips150_pkg::*;
(
  input  br_type_e    br_type,
  input  logic [31:0] pc,
  input  logic [25:0] target,   // instr[25:0]; its low 16 bits are the immediate
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  output logic        taken,
  output logic [31:0] dest
);

  logic [31:0] pc4, br_dest;
  logic        rs_zero, rs_neg;

  assign pc4     = pc + 32'd4;
  assign br_dest = pc4 + {{14{target[15]}}, target[15:0], 2'b00};
  assign rs_zero = (rs_val == 32'd0);
  assign rs_neg  = rs_val[31];

  always_comb begin
    taken = 1'b0;
    dest  = br_dest;
    unique case (br_type)
      BR_NONE: taken = 1'b0;
      BR_J:  begin taken = 1'b1; dest = {pc[31:28], target, 2'b00}; end
      BR_JR: begin taken = 1'b1; dest = rs_val; end
      BR_EQ:  taken = (rs_val == rt_val);
      BR_NE:  taken = (rs_val != rt_val);
      BR_LEZ: taken = rs_neg || rs_zero;
      BR_GTZ: taken = !rs_neg && !rs_zero;
      BR_LTZ: taken = rs_neg;
      BR_GEZ: taken = !rs_neg;
      default: taken = 1'b0;
    endcase
  end

endmodule
