// forward_unit: data-hazard forwarding of the MIPS150 three-stage CPU.
//
// The CPU resolves data hazards only by forwarding, never by stalling. The
// register file is written at the end of the write-back stage, so the one
// instruction that can read a stale value is the one directly behind the
// writer. When the instruction in write-back writes a non-zero register that
// the executing instruction names as rs or rt, the matching select goes high
// and the execute stage takes the write-back result instead of the register
// file output. Load results are not forwarded: the ISA's architected load
// delay slot forbids the next instruction from using them, which keeps the
// block-RAM read path out of the execute stage. Timing: combinational.
module forward_unit (
  input  logic [4:0] x_rs,
  input  logic [4:0] x_rt,
  input  logic       w_reg_write,
  input  logic       w_is_load,
  input  logic [4:0] w_dst,
  output logic       fwd_rs,
  output logic       fwd_rt
);

  logic w_fwd_ok;
  assign w_fwd_ok = w_reg_write && !w_is_load && (w_dst != 5'd0);
  assign fwd_rs   = w_fwd_ok && (w_dst == x_rs);
  assign fwd_rt   = w_fwd_ok && (w_dst == x_rt);

endmodule
