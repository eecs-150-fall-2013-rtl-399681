// mips150_cpu_tb: random-program test of the three-stage CPU against an
// instruction-set reference model.
//
// Each round generates a random program that uses every instruction of the
// subset, places it in the instruction memory, fills the data memory with
// random words, and runs the CPU from reset until it reaches the final
// `j .` loop. The same program runs on a sequential reference model written
// here from the instruction table (one branch delay slot; the generator keeps
// the instruction after a load from touching the loaded register, as the ISA
// requires). At the end the register file, the data-memory and instruction-
// memory areas the program stores to, the bytes written to the UART data
// register and the number of UART receive reads must all match. A simple
// UART stand-in is always ready and always holds a byte. The test also counts
// forwarding, taken branches, jumps through registers, stores that write both
// memories, byte/halfword accesses and I/O accesses, and fails if any of them
// never happened. Throughput is checked too: with no stalls, the CPU must
// reach the end loop in exactly as many cycles as the model executed
// instructions, plus the fill of the fetch stage.
module mips150_cpu_tb;
  import mips150_pkg::*;
  import mips150_asm_pkg::*;

  localparam int ROUNDS  = 24;
  localparam int BODY    = 400;
  localparam int MAXPROG = 600;

  // reserved registers
  localparam int R_JT   = 27;  // jump-register target
  localparam int R_DMEM = 28;  // 0x1000_2000: data memory only
  localparam int R_BOTH = 29;  // 0x3000_2400: data and instruction memory
  localparam int R_IO   = 30;  // 0x8000_0000: I/O

  logic clk = 0, rst = 1;
  logic [7:0] tx_data;
  logic       tx_valid, rx_ready;
  logic [7:0] rx_byte;

  mips150_cpu dut (
    .clk, .rst,
    .uart_data_in(tx_data), .uart_data_in_valid(tx_valid), .uart_data_in_ready(1'b1),
    .uart_data_out(rx_byte), .uart_data_out_valid(1'b1), .uart_data_out_ready(rx_ready)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_taken = 0, n_jr = 0, n_dual = 0, n_sub = 0, n_tx = 0, n_rx = 0, n_load = 0;
  int n_r0 = 0;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------- program builder
  logic [31:0] prog [MAXPROG];
  int          plen;
  bit          targeted [MAXPROG];
  bit          no_target [MAXPROG];

  function automatic int pick_dst();
    int r;
    if ($urandom_range(0, 40) == 0) return 0;
    r = $urandom_range(1, 27);
    return (r == 27) ? 31 : r;
  endfunction

  function automatic int pick_src();
    return $urandom_range(0, 31);
  endfunction

  // choose a forward branch target in [lo, hi] that may be jumped to
  function automatic int pick_target(int lo, int hi);
    int t;
    for (int k = 0; k < 20; k++) begin
      t = $urandom_range(lo, hi);
      if (!no_target[t]) return t;
    end
    return hi;   // the halt loop is always a legal target
  endfunction

  task automatic build_program();
    int i, halt;
    bit in_delay;
    int load_dst;
    plen = 0;
    foreach (targeted[k]) begin targeted[k] = 0; no_target[k] = 0; end
    // prologue: known values in every register
    for (int r = 1; r < 32; r++) begin
      if (r == R_JT) continue;
      prog[plen++] = lui(r, (r == R_DMEM) ? 16'h1000 : (r == R_BOTH) ? 16'h3000 :
                            (r == R_IO) ? 16'h8000 : 16'($urandom));
      prog[plen++] = ori(r, r, (r == R_DMEM) ? 16'h2000 : (r == R_BOTH) ? 16'h2400 :
                               (r == R_IO) ? 16'h0000 : 16'($urandom));
    end
    halt = plen + BODY;
    prog[plen++] = addiu(R_JT, 0, halt * 4);
    in_delay = 0;
    load_dst = -1;
    i = plen;
    while (i < halt) begin
      int kind, rd, rs, rt, t, sel;
      logic [31:0] w;
      bit is_branch, is_load;
      is_branch = 0; is_load = 0;
      kind = $urandom_range(0, 99);
      // the delay slot of a branch holds no control transfer and no load
      if (in_delay && kind >= 45) kind = $urandom_range(0, 44);
      // a register-jump pair needs two free slots before the halt loop
      if (kind >= 95 && (i + 2 >= halt || targeted[i + 1])) kind = 0;
      for (int tries = 0; tries < 50; tries++) begin
        rd = pick_dst(); rs = pick_src(); rt = pick_src();
        if (load_dst < 0 || (rd != load_dst && rs != load_dst && rt != load_dst)) break;
      end
      if (load_dst >= 0 && (rd == load_dst || rs == load_dst || rt == load_dst)) begin
        rd = (load_dst == 1) ? 2 : 1; rs = rd; rt = 0;
      end
      if (kind < 25) begin
        sel = $urandom_range(0, 13);
        case (sel)
          0:  w = addu(rd, rs, rt);   1:  w = subu(rd, rs, rt);
          2:  w = and_(rd, rs, rt);   3:  w = or_(rd, rs, rt);
          4:  w = xor_(rd, rs, rt);   5:  w = nor_(rd, rs, rt);
          6:  w = slt(rd, rs, rt);    7:  w = sltu(rd, rs, rt);
          8:  w = sllv(rd, rt, rs);   9:  w = srlv(rd, rt, rs);
          10: w = srav(rd, rt, rs);   11: w = sll(rd, rt, $urandom_range(0, 31));
          12: w = srl(rd, rt, $urandom_range(0, 31));
          default: w = sra(rd, rt, $urandom_range(0, 31));
        endcase
      end else if (kind < 45) begin
        logic [15:0] imm;
        imm = ($urandom_range(0, 3) == 0) ? 16'($urandom_range(0, 3)) - 16'd1 : 16'($urandom);
        sel = $urandom_range(0, 7);
        case (sel)
          0: w = addiu(rd, rs, imm);  1: w = slti(rd, rs, imm);
          2: w = sltiu(rd, rs, imm);  3: w = andi(rd, rs, imm);
          4: w = ori(rd, rs, imm);    5: w = xori(rd, rs, imm);
          6: w = lui(rd, imm);
          default: w = sw(rt, 4 * $urandom_range(0, 63), ($urandom_range(0, 1) == 1) ? R_DMEM : R_BOTH);
        endcase
      end else if (kind < 62) begin
        int base, off;
        is_load = 1;
        base = ($urandom_range(0, 1) == 1) ? R_DMEM : R_BOTH;
        off  = $urandom_range(0, 255);
        sel = $urandom_range(0, 6);
        case (sel)
          0: w = lb(rd, off, base);
          1: w = lbu(rd, off, base);
          2: w = lh(rd, off & ~1, base);
          3: w = lhu(rd, off & ~1, base);
          4: w = lw(rd, 4 * $urandom_range(0, 3), R_IO);
          default: w = lw(rd, off & ~3, base);
        endcase
      end else if (kind < 75) begin
        int base, off;
        base = ($urandom_range(0, 1) == 1) ? R_DMEM : R_BOTH;
        off  = $urandom_range(0, 255);
        sel = $urandom_range(0, 3);
        case (sel)
          0: w = sb(rt, off, base);
          1: w = sh(rt, off & ~1, base);
          2: w = sw(rt, 4 * $urandom_range(0, 3), R_IO);
          default: w = sw(rt, off & ~3, base);
        endcase
      end else if (kind < 90) begin
        int off;
        is_branch = 1;
        t = pick_target(i + 2, (i + 8 < halt) ? i + 8 : halt);
        targeted[t] = 1;
        off = t - (i + 1);
        sel = $urandom_range(0, 5);
        case (sel)
          0: w = beq(rs, ($urandom_range(0, 1) == 1) ? rs : rt, off);
          1: w = bne(rs, rt, off);
          2: w = blez(rs, off);
          3: w = bgtz(rs, off);
          4: w = bltz(rs, off);
          default: w = bgez(rs, off);
        endcase
      end else if (kind < 95) begin
        is_branch = 1;
        t = pick_target(i + 2, (i + 10 < halt) ? i + 10 : halt);
        targeted[t] = 1;
        w = ($urandom_range(0, 1) == 1) ? j(t * 4) : jal(t * 4);
      end else begin
        // register jump: set the target, then JR or JALR through it
        t = pick_target(i + 3, (i + 10 < halt) ? i + 10 : halt);
        targeted[t] = 1;
        no_target[i + 1] = 1;
        prog[i] = addiu(R_JT, 0, t * 4);
        i++;
        w = ($urandom_range(0, 1) == 1) ? jr(R_JT) : jalr(rd, R_JT);
        is_branch = 1;
      end
      prog[i] = w;
      in_delay = is_branch;
      load_dst = is_load ? int'(w[20:16]) : -1;
      i++;
    end
    prog[halt]     = j(halt * 4);
    prog[halt + 1] = nop();
    plen = halt + 2;
  endtask

  // ------------------------------------------------------- reference model
  logic [31:0] m_regs [32];
  logic [31:0] m_dmem [4096];
  logic [31:0] m_imem [4096];
  logic [7:0]  m_tx [$];
  int          m_rx, m_steps;

  function automatic logic [31:0] m_load_word(logic [31:0] a);
    if (a[31:28] == 4'b1000) begin
      unique case (a[3:2])
        2'd0, 2'd1: return 32'd1;
        2'd3: begin m_rx++; return {24'b0, rx_byte}; end
        default: return 32'd0;
      endcase
    end
    if (!a[31] && a[28]) return m_dmem[a[13:2]];
    return 32'd0;
  endfunction

  task automatic m_store(logic [31:0] a, logic [31:0] v, int size);
    logic [31:0] mask, data;
    int sh;
    sh   = 8 * (3 - int'(a[1:0]));
    if (size == 1) begin mask = 32'hFF << sh;          data = (v & 32'hFF) << sh; end
    else if (size == 2) begin
      sh   = a[1] ? 0 : 16;
      mask = 32'hFFFF << sh; data = (v & 32'hFFFF) << sh;
    end else begin mask = '1; data = v; end
    if (!a[31] && a[28]) m_dmem[a[13:2]] = (m_dmem[a[13:2]] & ~mask) | data;
    if (!a[31] && a[29]) m_imem[a[13:2]] = (m_imem[a[13:2]] & ~mask) | data;
    if (a[31:28] == 4'b1000 && a[3:2] == 2'd2) m_tx.push_back(v[7:0]);
  endtask

  task automatic run_model(int halt_pc);
    logic [31:0] pc, npc;
    m_rx = 0; m_steps = 0; m_tx.delete();
    pc = 0; npc = 4;
    while (pc != halt_pc && m_steps < 100000) begin
      logic [31:0] w, rs, rt, simm, zimm, res, a, nnpc, word;
      logic [4:0]  d;
      bit          wr;
      w = m_imem[pc[13:2]];
      rs = m_regs[w[25:21]]; rt = m_regs[w[20:16]];
      simm = {{16{w[15]}}, w[15:0]}; zimm = {16'b0, w[15:0]};
      a = rs + simm;
      nnpc = npc + 4;
      wr = 0; d = w[20:16]; res = 0;
      case (w[31:26])
        6'h00: begin
          d = w[15:11]; wr = 1;
          case (w[5:0])
            6'h00: res = rt << w[10:6];
            6'h02: res = rt >> w[10:6];
            6'h03: res = $unsigned($signed(rt) >>> w[10:6]);
            6'h04: res = rt << rs[4:0];
            6'h06: res = rt >> rs[4:0];
            6'h07: res = $unsigned($signed(rt) >>> rs[4:0]);
            6'h08: begin wr = 0; nnpc = rs; end
            6'h09: begin res = pc + 8; nnpc = rs; end
            6'h21: res = rs + rt;
            6'h23: res = rs - rt;
            6'h24: res = rs & rt;
            6'h25: res = rs | rt;
            6'h26: res = rs ^ rt;
            6'h27: res = ~(rs | rt);
            6'h2A: res = ($signed(rs) < $signed(rt)) ? 1 : 0;
            6'h2B: res = (rs < rt) ? 1 : 0;
            default: wr = 0;
          endcase
        end
        6'h01: if ((w[16] == 0) ? $signed(rs) < 0 : $signed(rs) >= 0) nnpc = pc + 4 + (simm << 2);
        6'h02: nnpc = {pc[31:28], w[25:0], 2'b00};
        6'h03: begin nnpc = {pc[31:28], w[25:0], 2'b00}; wr = 1; d = 31; res = pc + 8; end
        6'h04: if (rs == rt) nnpc = pc + 4 + (simm << 2);
        6'h05: if (rs != rt) nnpc = pc + 4 + (simm << 2);
        6'h06: if ($signed(rs) <= 0) nnpc = pc + 4 + (simm << 2);
        6'h07: if ($signed(rs) > 0) nnpc = pc + 4 + (simm << 2);
        6'h09: begin wr = 1; res = a; end
        6'h0A: begin wr = 1; res = ($signed(rs) < $signed(simm)) ? 1 : 0; end
        6'h0B: begin wr = 1; res = (rs < simm) ? 1 : 0; end
        6'h0C: begin wr = 1; res = rs & zimm; end
        6'h0D: begin wr = 1; res = rs | zimm; end
        6'h0E: begin wr = 1; res = rs ^ zimm; end
        6'h0F: begin wr = 1; res = {w[15:0], 16'b0}; end
        6'h20, 6'h24: begin
          wr = 1; word = m_load_word(a);
          res = (word >> (8 * (3 - int'(a[1:0])))) & 32'hFF;
          if (w[31:26] == 6'h20 && res[7]) res |= 32'hFFFF_FF00;
        end
        6'h21, 6'h25: begin
          wr = 1; word = m_load_word(a);
          res = a[1] ? (word & 32'hFFFF) : (word >> 16);
          if (w[31:26] == 6'h21 && res[15]) res |= 32'hFFFF_0000;
        end
        6'h23: begin wr = 1; res = m_load_word(a); end
        6'h28: m_store(a, rt, 1);
        6'h29: m_store(a, rt, 2);
        6'h2B: m_store(a, rt, 4);
        default: ;
      endcase
      if (wr && d != 0) m_regs[d] = res;
      pc = npc; npc = nnpc;
      m_steps++;
    end
  endtask

  // ------------------------------------------------------- monitors
  logic [7:0] rtl_tx [$];
  int         rtl_rx;
  always @(posedge clk) if (!rst) begin
    if (dut.fwd_rs || dut.fwd_rt) n_fwd++;
    if (dut.br_taken && dut.ctrl_x.br_type inside {BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ}) n_taken++;
    if (dut.ctrl_x.br_type == BR_JR) n_jr++;
    if (dut.imem_we != 0 && dut.dmem_we != 0) n_dual++;
    if ((dut.ctrl_x.mem_read || dut.ctrl_x.mem_write) && dut.ctrl_x.mem_size != SZ_WORD) n_sub++;
    if (dut.ctrl_x.mem_read) n_load++;
    if (dut.ctrl_x.reg_write && dut.dst_x == 0) n_r0++;
    if (tx_valid) begin rtl_tx.push_back(tx_data); n_tx++; end
    if (rx_ready) begin rtl_rx++; n_rx++; end
  end

  // ------------------------------------------------------- main
  initial begin
    repeat (ROUNDS * (MAXPROG + 200) * 4) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < ROUNDS; round++) begin
      int halt, cycles;
      rst = 1;
      rx_byte = 8'($urandom);
      build_program();
      halt = (plen - 2) * 4;
      for (int k = 0; k < 4096; k++) begin
        m_imem[k] = (k < plen) ? prog[k] : 32'h0;
        m_dmem[k] = $urandom;
        dut.u_imem.mem[k] = m_imem[k];
        dut.u_dmem.mem[k] = m_dmem[k];
      end
      for (int r = 0; r < 32; r++) m_regs[r] = 0;
      run_model(halt);
      rtl_tx.delete(); rtl_rx = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst = 0;
      // the first instruction is in X in the first cycle after reset
      cycles = 0;
      while (dut.pc_x != halt && cycles < MAXPROG * 4) begin
        @(negedge clk); cycles++;
      end
      repeat (4) @(negedge clk);
      expect_eq(32'(cycles), 32'(m_steps), "cycles to reach the end loop (one instruction per cycle)");
      for (int r = 1; r < 32; r++)
        if (r != R_JT) expect_eq(dut.u_regfile.regs[r], m_regs[r], $sformatf("round %0d r%0d", round, r));
      for (int k = 'h800; k < 'h840; k++) expect_eq(dut.u_dmem.mem[k], m_dmem[k], $sformatf("dmem[%h]", k));
      for (int k = 'h900; k < 'h940; k++) begin
        expect_eq(dut.u_dmem.mem[k], m_dmem[k], $sformatf("dmem[%h]", k));
        expect_eq(dut.u_imem.mem[k], m_imem[k], $sformatf("imem[%h]", k));
      end
      expect_eq(32'(rtl_tx.size()), 32'(m_tx.size()), "UART bytes written");
      foreach (m_tx[k]) if (k < rtl_tx.size()) expect_eq(32'(rtl_tx[k]), 32'(m_tx[k]), "UART byte");
      expect_eq(32'(rtl_rx), 32'(m_rx), "UART receive reads");
    end
    $display("events: forwards=%0d taken_branches=%0d reg_jumps=%0d dual_stores=%0d sub_word=%0d loads=%0d tx=%0d rx=%0d r0_writes=%0d",
             n_fwd, n_taken, n_jr, n_dual, n_sub, n_load, n_tx, n_rx, n_r0);
    if (n_fwd == 0 || n_taken == 0 || n_jr == 0 || n_dual == 0 || n_sub == 0 ||
        n_load == 0 || n_tx == 0 || n_rx == 0 || n_r0 == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
