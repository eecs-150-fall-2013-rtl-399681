// load_extract_tb: self-checking test of load byte/halfword selection.
// Random words for every width, offset and signedness; the expected value
// is picked from the word big-endian (offset 00 = bits [31:24]) and
// extended here.
module load_extract_tb;
  import mips150_pkg::*;

  logic [31:0] rdata, data;
  logic [1:0]  offset;
  mem_size_e   mem_size;
  logic        mem_unsigned;
  int checks = 0, failures = 0;

  load_extract dut (.rdata, .offset, .mem_size, .mem_unsigned, .data);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++)
      for (int sz = 0; sz < 3; sz++)
        for (int off = 0; off < 4; off++)
          for (int u = 0; u < 2; u++) begin
            logic [31:0] exp;
            logic [7:0]  bytes [4];
            rdata = (n == 0) ? 32'h80FF_7F01 : $urandom;
            offset = 2'(off); mem_size = mem_size_e'(sz); mem_unsigned = 1'(u);
            #1;
            for (int b = 0; b < 4; b++) bytes[b] = rdata[31 - 8*b -: 8];
            case (sz)
              0: exp = u ? {24'b0, bytes[off]} : {{24{bytes[off][7]}}, bytes[off]};
              1: begin
                logic [15:0] h;
                h = {bytes[off & 2], bytes[(off & 2) + 1]};
                exp = u ? {16'b0, h} : {{16{h[15]}}, h};
              end
              default: exp = rdata;
            endcase
            checks++;
            if (data !== exp) begin
              failures++;
              $display("FAIL word=%h size=%0d off=%0d u=%0d: got %h expected %h",
                       rdata, sz, off, u, data, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
