// mips150_asm_pkg: instruction encoders for MIPS150 test programs.
//
// Functions that return the 32-bit machine word of each instruction of the
// MIPS150 subset, following the standard MIPS R/I/J formats, so that
// testbenches can write programs in readable form straight into the
// instruction memory.
package mips150_asm_pkg;

  function automatic logic [31:0] enc_r(logic [5:0] fn, logic [4:0] rs, logic [4:0] rt,
                                        logic [4:0] rd, logic [4:0] sh = 5'd0);
    return {6'b000000, rs, rt, rd, sh, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rs, logic [4:0] rt,
                                        logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] addr);
    return {op, addr[27:2]};
  endfunction

  // register-register
  function automatic logic [31:0] addu(int rd, int rs, int rt); return enc_r(6'h21, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] subu(int rd, int rs, int rt); return enc_r(6'h23, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] and_(int rd, int rs, int rt); return enc_r(6'h24, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] or_ (int rd, int rs, int rt); return enc_r(6'h25, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] xor_(int rd, int rs, int rt); return enc_r(6'h26, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] nor_(int rd, int rs, int rt); return enc_r(6'h27, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] slt (int rd, int rs, int rt); return enc_r(6'h2A, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] sltu(int rd, int rs, int rt); return enc_r(6'h2B, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] sllv(int rd, int rt, int rs); return enc_r(6'h04, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] srlv(int rd, int rt, int rs); return enc_r(6'h06, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] srav(int rd, int rt, int rs); return enc_r(6'h07, 5'(rs), 5'(rt), 5'(rd)); endfunction
  function automatic logic [31:0] sll (int rd, int rt, int sh); return enc_r(6'h00, 5'd0, 5'(rt), 5'(rd), 5'(sh)); endfunction
  function automatic logic [31:0] srl (int rd, int rt, int sh); return enc_r(6'h02, 5'd0, 5'(rt), 5'(rd), 5'(sh)); endfunction
  function automatic logic [31:0] sra (int rd, int rt, int sh); return enc_r(6'h03, 5'd0, 5'(rt), 5'(rd), 5'(sh)); endfunction
  function automatic logic [31:0] jr  (int rs);                 return enc_r(6'h08, 5'(rs), 5'd0, 5'd0); endfunction
  function automatic logic [31:0] jalr(int rd, int rs);         return enc_r(6'h09, 5'(rs), 5'd0, 5'(rd)); endfunction
  function automatic logic [31:0] nop();                        return 32'h0000_0000; endfunction

  // immediate
  function automatic logic [31:0] addiu(int rt, int rs, int imm); return enc_i(6'h09, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] slti (int rt, int rs, int imm); return enc_i(6'h0A, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] sltiu(int rt, int rs, int imm); return enc_i(6'h0B, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] andi (int rt, int rs, int imm); return enc_i(6'h0C, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] ori  (int rt, int rs, int imm); return enc_i(6'h0D, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] xori (int rt, int rs, int imm); return enc_i(6'h0E, 5'(rs), 5'(rt), 16'(imm)); endfunction
  function automatic logic [31:0] lui  (int rt, int imm);         return enc_i(6'h0F, 5'd0, 5'(rt), 16'(imm)); endfunction

  // loads and stores: op rt, off(base)
  function automatic logic [31:0] lb (int rt, int off, int base); return enc_i(6'h20, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] lh (int rt, int off, int base); return enc_i(6'h21, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] lw (int rt, int off, int base); return enc_i(6'h23, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] lbu(int rt, int off, int base); return enc_i(6'h24, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] lhu(int rt, int off, int base); return enc_i(6'h25, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] sb (int rt, int off, int base); return enc_i(6'h28, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] sh (int rt, int off, int base); return enc_i(6'h29, 5'(base), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] sw (int rt, int off, int base); return enc_i(6'h2B, 5'(base), 5'(rt), 16'(off)); endfunction

  // branches: offset in instructions relative to the delay slot
  function automatic logic [31:0] beq (int rs, int rt, int off); return enc_i(6'h04, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] bne (int rs, int rt, int off); return enc_i(6'h05, 5'(rs), 5'(rt), 16'(off)); endfunction
  function automatic logic [31:0] blez(int rs, int off);         return enc_i(6'h06, 5'(rs), 5'd0, 16'(off)); endfunction
  function automatic logic [31:0] bgtz(int rs, int off);         return enc_i(6'h07, 5'(rs), 5'd0, 16'(off)); endfunction
  function automatic logic [31:0] bltz(int rs, int off);         return enc_i(6'h01, 5'(rs), 5'd0, 16'(off)); endfunction
  function automatic logic [31:0] bgez(int rs, int off);         return enc_i(6'h01, 5'(rs), 5'd1, 16'(off)); endfunction

  // jumps to an absolute byte address
  function automatic logic [31:0] j  (logic [31:0] addr); return enc_j(6'h02, addr); endfunction
  function automatic logic [31:0] jal(logic [31:0] addr); return enc_j(6'h03, addr); endfunction

endpackage
