// mips150_cpu: three-stage pipelined MIPS150 CPU with its block RAMs.
//
// Pipeline (all state on the rising clock edge, no stalls):
//   F  fetch   The next PC is chosen (reset PC, pending branch target, or
//              PC+4) and presented to instruction-memory port B. The block
//              RAM's synchronous read is the F/X pipeline register.
//   X  execute The instruction is decoded, the register file read
//              asynchronously, results of the instruction in W forwarded,
//              the ALU run, branches and jumps resolved, and the memory
//              address, byte mask and store data presented to the data
//              memory, the instruction memory (port A) and the I/O
//              registers, which all sample them at the end of X.
//   W  memory/write-back  The synchronous block-RAM or I/O read data is
//              extracted (byte/halfword, sign or zero extension) and the
//              result written to the register file at the end of W.
// Branches and jumps have one architected delay slot: the branch decision
// made in X is registered and redirects the fetch one cycle later, so the
// instruction after the branch always executes. Loads have one architected
// delay slot as well: their data is written at the end of W and is not
// forwarded, so the second instruction after a load is the first to see it.
// ALU and link (PC+8) results are forwarded from W to X. Stores go to the
// data memory, the instruction memory or both, or to I/O, by address bits
// [31:28]; instruction fetch always reads the instruction memory, using
// PC[13:2] as the word address. The register file and memories have no
// reset; the memories can be preloaded from hex files (IMEM_INIT_FILE,
// DMEM_INIT_FILE). The stage split (where the BRAMs sit) and the reset PC are this
// design's choices; the ISA, the delay slots, forwarding without stalls,
// the memory partitioning and the I/O map follow the MIPS150 specification.
module mips150_cpu
  import mips150_pkg::*;
#(
  parameter logic [31:0] RESET_PC       = 32'h0000_0000,
  parameter string       IMEM_INIT_FILE = "",   // optional hex image of the instruction memory
  parameter string       DMEM_INIT_FILE = ""    // optional hex image of the data memory
) (
  input  logic       clk,
  input  logic       rst,
  // UART byte interfaces
  output logic [7:0] uart_data_in,
  output logic       uart_data_in_valid,
  input  logic       uart_data_in_ready,
  input  logic [7:0] uart_data_out,
  input  logic       uart_data_out_valid,
  output logic       uart_data_out_ready
);

  localparam int unsigned MEM_DEPTH = 4096;
  localparam int unsigned MEM_AW    = $clog2(MEM_DEPTH);

  // ------------------------------------------------------------------ F
  logic [31:0] pc_x;          // PC of the instruction in X
  logic [31:0] fetch_pc;
  logic        redirect_q;    // a branch/jump taken in the previous cycle
  logic [31:0] redirect_pc_q;
  logic [31:0] instr_x;

  always_comb begin
    if (rst)             fetch_pc = RESET_PC;
    else if (redirect_q) fetch_pc = redirect_pc_q;
    else                 fetch_pc = pc_x + 32'd4;
  end

  always_ff @(posedge clk) pc_x <= fetch_pc;

  // ------------------------------------------------------------------ X
  ctrl_t       ctrl_x;
  alu_op_e     alu_op_x;
  logic [4:0]  rs_x, rt_x, rd_x, dst_x;
  logic [31:0] rf_rs, rf_rt, rs_val, rt_val;
  logic [31:0] alu_a, alu_b, alu_y;
  logic        fwd_rs, fwd_rt;
  logic        br_taken;
  logic [31:0] br_dest;
  logic [31:0] link_x, result_x;
  logic [3:0]  dmem_we, imem_we;
  logic [31:0] mem_wdata;
  logic        dmem_sel, io_sel, io_write, io_read;
  logic        x_live;

  // W-stage state (declared here because X reads it for forwarding)
  logic        w_reg_write, w_is_load, w_dmem_sel, w_io_sel, w_mem_unsigned;
  logic [4:0]  w_dst;
  logic [31:0] w_result, w_load_word, w_load_data, w_wb_data;
  logic [1:0]  w_offset;
  mem_size_e   w_mem_size;
  logic [31:0] dmem_rdata, io_rdata;

  assign x_live = !rst;
  assign rs_x   = instr_x[25:21];
  assign rt_x   = instr_x[20:16];
  assign rd_x   = instr_x[15:11];

  control u_control (.instr(instr_x), .ctrl(ctrl_x));
  alu_dec u_alu_dec (.opcode(instr_x[31:26]), .funct(instr_x[5:0]), .alu_op(alu_op_x));

  regfile u_regfile (
    .clk,
    .we  (w_reg_write),
    .wa  (w_dst),
    .wd  (w_wb_data),
    .ra1 (rs_x),
    .ra2 (rt_x),
    .rd1 (rf_rs),
    .rd2 (rf_rt)
  );

  forward_unit u_forward (
    .x_rs        (rs_x),
    .x_rt        (rt_x),
    .w_reg_write (w_reg_write),
    .w_is_load   (w_is_load),
    .w_dst       (w_dst),
    .fwd_rs      (fwd_rs),
    .fwd_rt      (fwd_rt)
  );

  assign rs_val = fwd_rs ? w_result : rf_rs;
  assign rt_val = fwd_rt ? w_result : rf_rt;

  always_comb begin
    alu_a = (ctrl_x.a_sel == A_SHAMT) ? {27'b0, instr_x[10:6]} : rs_val;
    unique case (ctrl_x.b_sel)
      B_SEXT:  alu_b = {{16{instr_x[15]}}, instr_x[15:0]};
      B_ZEXT:  alu_b = {16'b0, instr_x[15:0]};
      default: alu_b = rt_val;
    endcase
  end

  alu u_alu (.a(alu_a), .b(alu_b), .op(alu_op_x), .result(alu_y));

  branch_unit u_branch (
    .br_type (ctrl_x.br_type),
    .pc      (pc_x),
    .target  (instr_x[25:0]),
    .rs_val  (rs_val),
    .rt_val  (rt_val),
    .taken   (br_taken),
    .dest    (br_dest)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      redirect_q    <= 1'b0;
      redirect_pc_q <= RESET_PC;
    end else begin
      redirect_q    <= br_taken;
      redirect_pc_q <= br_dest;
    end
  end

  always_comb begin
    unique case (ctrl_x.dst_sel)
      DST_RD:  dst_x = rd_x;
      DST_RA:  dst_x = 5'd31;
      default: dst_x = rt_x;
    endcase
  end

  assign link_x   = pc_x + 32'd8;
  assign result_x = (ctrl_x.wb_sel == WB_PC8) ? link_x : alu_y;

  mem_ctrl u_mem_ctrl (
    .addr       (alu_y),
    .store_data (rt_val),
    .mem_read   (ctrl_x.mem_read && x_live),
    .mem_write  (ctrl_x.mem_write && x_live),
    .mem_size   (ctrl_x.mem_size),
    .dmem_we    (dmem_we),
    .imem_we    (imem_we),
    .wdata      (mem_wdata),
    .dmem_sel   (dmem_sel),
    .io_sel     (io_sel),
    .io_write   (io_write),
    .io_read    (io_read)
  );

  imem_blk_ram #(.DEPTH(MEM_DEPTH), .INIT_FILE(IMEM_INIT_FILE)) u_imem (
    .clk,
    .addra (alu_y[MEM_AW+1:2]),
    .wea   (imem_we),
    .dina  (mem_wdata),
    .addrb (fetch_pc[MEM_AW+1:2]),
    .doutb (instr_x)
  );

  dmem_blk_ram #(.DEPTH(MEM_DEPTH), .INIT_FILE(DMEM_INIT_FILE)) u_dmem (
    .clk,
    .addra (alu_y[MEM_AW+1:2]),
    .wea   (dmem_we),
    .dina  (mem_wdata),
    .douta (dmem_rdata)
  );

  io_map u_io (
    .clk, .rst,
    .io_read             (io_read),
    .io_write            (io_write),
    .reg_sel             (alu_y[3:2]),
    .wdata               (mem_wdata),
    .rdata               (io_rdata),
    .uart_data_in        (uart_data_in),
    .uart_data_in_valid  (uart_data_in_valid),
    .uart_data_in_ready  (uart_data_in_ready),
    .uart_data_out       (uart_data_out),
    .uart_data_out_valid (uart_data_out_valid),
    .uart_data_out_ready (uart_data_out_ready)
  );

  // ---------------------------------------------------------- X/W register
  always_ff @(posedge clk) begin
    if (rst) begin
      w_reg_write    <= 1'b0;
      w_is_load      <= 1'b0;
      w_dst          <= '0;
      w_result       <= '0;
      w_dmem_sel     <= 1'b0;
      w_io_sel       <= 1'b0;
      w_offset       <= '0;
      w_mem_size     <= SZ_WORD;
      w_mem_unsigned <= 1'b0;
    end else begin
      w_reg_write    <= ctrl_x.reg_write;
      w_is_load      <= ctrl_x.mem_read;
      w_dst          <= dst_x;
      w_result       <= result_x;
      w_dmem_sel     <= dmem_sel;
      w_io_sel       <= io_sel;
      w_offset       <= alu_y[1:0];
      w_mem_size     <= ctrl_x.mem_size;
      w_mem_unsigned <= ctrl_x.mem_unsigned;
    end
  end

  // ------------------------------------------------------------------ W
  always_comb begin
    if (w_io_sel)        w_load_word = io_rdata;
    else if (w_dmem_sel) w_load_word = dmem_rdata;
    else                 w_load_word = '0;   // instruction memory is write-only
  end

  load_extract u_load (
    .rdata        (w_load_word),
    .offset       (w_offset),
    .mem_size     (w_mem_size),
    .mem_unsigned (w_mem_unsigned),
    .data         (w_load_data)
  );

  assign w_wb_data = w_is_load ? w_load_data : w_result;

endmodule
