// alu_tb: self-checking test of the ALU.
// Applies directed corner values and random operands to every operation and
// compares with results computed here from the MIPS instruction semantics.
module alu_tb;
  import mips150_pkg::*;

  logic [31:0] a, b, y;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .result(y));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    int signed sx = x, sz = z;
    longint unsigned ux = x, uz = z;
    case (o)
      ALU_ADDU: return 32'(ux + uz);
      ALU_SUBU: return 32'(ux - uz);
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return (ux < uz) ? 32'd1 : 32'd0;
      ALU_SLL:  return z << x[4:0];
      ALU_SRL:  return z >> x[4:0];
      ALU_SRA: begin
        logic [31:0] r = z;
        for (int i = 0; i < int'(x[4:0]); i++) r = {r[31], r[31:1]};
        return r;
      end
      ALU_LUI:  return {z[15:0], 16'h0};
      default:  return 32'hx;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] exp;
    op = o; a = x; b = z;
    #1;
    exp = model(o, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h expected %h", o.name(), x, z, y, exp);
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
    // directed corners
    check(ALU_SLT,  32'hFFFF_FFFF, 32'h0000_0001);  // -1 < 1 signed
    check(ALU_SLTU, 32'hFFFF_FFFF, 32'h0000_0001);  // not unsigned
    check(ALU_SRA,  32'd4, 32'h8000_0000);
    check(ALU_SRL,  32'd4, 32'h8000_0000);
    check(ALU_SLL,  32'd31, 32'h0000_0003);
    check(ALU_ADDU, 32'hFFFF_FFFF, 32'd1);
    check(ALU_SUBU, 32'd0, 32'd1);
    check(ALU_LUI,  32'd0, 32'h0000_BEEF);
    check(ALU_NOR,  32'h0F0F_0000, 32'h0000_F0F0);
    for (int i = 0; i < 2000; i++) begin
      alu_op_e o;
      o = alu_op_e'($urandom_range(0, 11));
      check(o, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
