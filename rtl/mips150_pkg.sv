// mips150_pkg: shared types and constants of the MIPS150 three-stage CPU.
//
// Holds the opcode and funct encodings of the MIPS150 instruction subset, the
// ALU operation code, the decoded control bundle that travels down the
// pipeline, and the address-map constants of the memory-mapped I/O space.
// Opcode/funct values follow the standard MIPS encoding of the subset; the
// ALU operation numbering and the control-bundle layout are this design's own.
package mips150_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_REGIMM = 6'b000001,  // BLTZ / BGEZ, selected by the rt field
    OP_J     = 6'b000010,
    OP_JAL   = 6'b000011,
    OP_BEQ   = 6'b000100,
    OP_BNE   = 6'b000101,
    OP_BLEZ  = 6'b000110,
    OP_BGTZ  = 6'b000111,
    OP_ADDIU = 6'b001001,
    OP_SLTI  = 6'b001010,
    OP_SLTIU = 6'b001011,
    OP_ANDI  = 6'b001100,
    OP_ORI   = 6'b001101,
    OP_XORI  = 6'b001110,
    OP_LUI   = 6'b001111,
    OP_LB    = 6'b100000,
    OP_LH    = 6'b100001,
    OP_LW    = 6'b100011,
    OP_LBU   = 6'b100100,
    OP_LHU   = 6'b100101,
    OP_SB    = 6'b101000,
    OP_SH    = 6'b101001,
    OP_SW    = 6'b101011
  } opcode_e;

  // ------------------------------------------------------ R-type funct codes
  typedef enum logic [5:0] {
    FN_SLL  = 6'b000000,
    FN_SRL  = 6'b000010,
    FN_SRA  = 6'b000011,
    FN_SLLV = 6'b000100,
    FN_SRLV = 6'b000110,
    FN_SRAV = 6'b000111,
    FN_JR   = 6'b001000,
    FN_JALR = 6'b001001,
    FN_ADDU = 6'b100001,
    FN_SUBU = 6'b100011,
    FN_AND  = 6'b100100,
    FN_OR   = 6'b100101,
    FN_XOR  = 6'b100110,
    FN_NOR  = 6'b100111,
    FN_SLT  = 6'b101010,
    FN_SLTU = 6'b101011
  } funct_e;

  // rt field of REGIMM branches
  localparam logic [4:0] RT_BLTZ = 5'b00000;
  localparam logic [4:0] RT_BGEZ = 5'b00001;

  // ------------------------------------------------------------ ALU opcodes
  // Shifts shift operand B by A[4:0]; LUI places B[15:0] in the upper half.
  typedef enum logic [3:0] {
    ALU_ADDU = 4'd0,
    ALU_SUBU = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_NOR  = 4'd5,
    ALU_SLT  = 4'd6,
    ALU_SLTU = 4'd7,
    ALU_SLL  = 4'd8,
    ALU_SRL  = 4'd9,
    ALU_SRA  = 4'd10,
    ALU_LUI  = 4'd11
  } alu_op_e;

  // --------------------------------------------------------- control bundle
  typedef enum logic [1:0] {DST_RT, DST_RD, DST_RA} dst_sel_e;     // write register
  typedef enum logic [0:0] {A_RS, A_SHAMT} alu_a_sel_e;           // ALU operand A
  typedef enum logic [1:0] {B_RT, B_SEXT, B_ZEXT} alu_b_sel_e;    // ALU operand B
  typedef enum logic [1:0] {WB_ALU, WB_PC8, WB_MEM} wb_sel_e;     // write-back source
  typedef enum logic [1:0] {SZ_BYTE, SZ_HALF, SZ_WORD} mem_size_e; // access width

  typedef enum logic [3:0] {
    BR_NONE, BR_J, BR_JR, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ
  } br_type_e;

  typedef struct packed {
    logic       reg_write;
    dst_sel_e   dst_sel;
    alu_a_sel_e a_sel;
    alu_b_sel_e b_sel;
    wb_sel_e    wb_sel;
    logic       mem_read;
    logic       mem_write;
    mem_size_e  mem_size;
    logic       mem_unsigned;
    br_type_e   br_type;
    logic       illegal;
  } ctrl_t;

  // --------------------------------------------------------- memory map
  // Address[31:28] partitions: 0xx1 data memory, 0x1x instruction memory
  // (write only), 1000 memory-mapped I/O.
  localparam logic [3:0] IO_NIBBLE = 4'b1000;

  // I/O register word offsets, Address[3:2]
  localparam logic [1:0] IO_TX_CTRL = 2'd0;  // 0x80000000 {31'b0, DataInReady}
  localparam logic [1:0] IO_RX_CTRL = 2'd1;  // 0x80000004 {31'b0, DataOutValid}
  localparam logic [1:0] IO_TX_DATA = 2'd2;  // 0x80000008 write {24'b0, DataIn}
  localparam logic [1:0] IO_RX_DATA = 2'd3;  // 0x8000000c {24'b0, DataOut}

endpackage
