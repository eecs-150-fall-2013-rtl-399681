// mem_ctrl_tb: self-checking test of address partitioning and store lanes.
// For every top nibble, access width and byte offset, with random data,
// checks which memories are written, the byte mask (big-endian: offset 00
// is mask bit 3), the lane placement of the store data and the I/O strobes.
module mem_ctrl_tb;
  import mips150_pkg::*;

  logic [31:0] addr, store_data, wdata;
  logic        mem_read, mem_write;
  mem_size_e   mem_size;
  logic [3:0]  dmem_we, imem_we;
  logic        dmem_sel, io_sel, io_write, io_read;
  int checks = 0, failures = 0;

  mem_ctrl dut (.addr, .store_data, .mem_read, .mem_write, .mem_size, .dmem_we,
                .imem_we, .wdata, .dmem_sel, .io_sel, .io_write, .io_read);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s addr=%h size=%s: got %h expected %h", what, addr,
               mem_size.name(), got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int nib = 0; nib < 16; nib++)
      for (int sz = 0; sz < 3; sz++)
        for (int off = 0; off < 4; off++)
          for (int rw = 0; rw < 3; rw++) begin
            logic [3:0] exp_mask;
            logic       d, im, io;
            addr = {4'(nib), 26'($urandom), 2'(off)};
            store_data = $urandom;
            mem_size = mem_size_e'(sz);
            mem_read = (rw == 1); mem_write = (rw == 2);
            #1;
            d  = (nib < 8) && (nib % 2 == 1);
            im = (nib < 8) && ((nib / 2) % 2 == 1);
            io = (nib == 8);
            case (sz)
              0: exp_mask = 4'(1 << (3 - off));
              1: exp_mask = (off < 2) ? 4'b1100 : 4'b0011;
              default: exp_mask = 4'b1111;
            endcase
            expect_eq(32'(dmem_we), (mem_write && d) ? 32'(exp_mask) : 0, "dmem_we");
            expect_eq(32'(imem_we), (mem_write && im) ? 32'(exp_mask) : 0, "imem_we");
            expect_eq(32'({dmem_sel, io_sel}), 32'({d, io}), "partition select");
            expect_eq(32'({io_write, io_read}), 32'({mem_write && io, mem_read && io}), "io strobes");
            for (int b = 0; b < 4; b++) if (exp_mask[b]) begin
              logic [7:0] exp_byte;
              case (sz)
                0: exp_byte = store_data[7:0];
                1: exp_byte = (b % 2 == 1) ? store_data[15:8] : store_data[7:0];
                default: exp_byte = store_data[b*8 +: 8];
              endcase
              expect_eq(32'(wdata[b*8 +: 8]), 32'(exp_byte), "lane data");
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
