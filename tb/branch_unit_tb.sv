// branch_unit_tb: self-checking test of branch and jump resolution.
// Random PCs, operands and offsets for every branch kind; the condition and
// destination are recomputed here from the ISA definitions (signed
// comparisons with zero, PC+4+offset*4, {PC[31:28], target, 00}).
module branch_unit_tb;
  import mips150_pkg::*;

  br_type_e    br_type;
  logic [31:0] pc, rs_val, rt_val, dest;
  logic [25:0] target;
  logic        taken;
  int checks = 0, failures = 0;

  branch_unit dut (.br_type, .pc, .target, .rs_val, .rt_val, .taken, .dest);

  task automatic run(br_type_e k, logic [31:0] p, logic [25:0] t,
                     logic [31:0] s, logic [31:0] q);
    logic        exp_taken;
    logic [31:0] exp_dest;
    int signed   sv = s;
    int signed   off = $signed(t[15:0]);
    br_type = k; pc = p; target = t; rs_val = s; rt_val = q;
    #1;
    exp_dest = p + 4 + 32'(off * 4);
    case (k)
      BR_NONE: exp_taken = 0;
      BR_J:   begin exp_taken = 1; exp_dest = {p[31:28], t, 2'b00}; end
      BR_JR:  begin exp_taken = 1; exp_dest = s; end
      BR_EQ:  exp_taken = (s == q);
      BR_NE:  exp_taken = (s != q);
      BR_LEZ: exp_taken = (sv <= 0);
      BR_GTZ: exp_taken = (sv > 0);
      BR_LTZ: exp_taken = (sv < 0);
      BR_GEZ: exp_taken = (sv >= 0);
      default: exp_taken = 0;
    endcase
    checks++;
    if (taken !== exp_taken || (exp_taken && dest !== exp_dest)) begin
      failures++;
      $display("FAIL %s pc=%h t=%h rs=%h rt=%h: got %b/%h expected %b/%h",
               k.name(), p, t, s, q, taken, dest, exp_taken, exp_dest);
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
    logic [31:0] vals [5] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};
    for (int k = 0; k <= 8; k++)
      foreach (vals[v]) begin
        run(br_type_e'(k), $urandom, 26'($urandom), vals[v], vals[v]);
        run(br_type_e'(k), $urandom, 26'($urandom), vals[v], $urandom);
      end
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] s;
      s = $urandom;
      run(br_type_e'($urandom_range(0, 8)), $urandom, 26'($urandom), s,
          ($urandom_range(0, 3) == 0) ? s : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
