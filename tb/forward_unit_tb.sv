// forward_unit_tb: self-checking test of the forwarding selects.
// Exhausts register-number matches for rs/rt, the write enable, the load
// flag and register 0 with a reference rule: forward when the write-back
// instruction writes a non-zero register equal to the source and is not a
// load.
module forward_unit_tb;
  logic [4:0] x_rs, x_rt, w_dst;
  logic       w_reg_write, w_is_load, fwd_rs, fwd_rt;
  int checks = 0, failures = 0;

  forward_unit dut (.x_rs, .x_rt, .w_reg_write, .w_is_load, .w_dst, .fwd_rs, .fwd_rt);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 32; d++)
      for (int s = 0; s < 32; s++)
        for (int m = 0; m < 4; m++) begin
          logic exp_rs, exp_rt;
          w_dst = 5'(d); x_rs = 5'(s); x_rt = 5'(31 - s);
          w_reg_write = m[0]; w_is_load = m[1];
          #1;
          exp_rs = m[0] && !m[1] && d != 0 && d == s;
          exp_rt = m[0] && !m[1] && d != 0 && d == 31 - s;
          checks++;
          if (fwd_rs !== exp_rs || fwd_rt !== exp_rt) begin
            failures++;
            $display("FAIL dst=%0d rs=%0d rt=%0d we=%b ld=%b: got %b%b", d, s, 31 - s,
                     m[0], m[1], fwd_rs, fwd_rt);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
