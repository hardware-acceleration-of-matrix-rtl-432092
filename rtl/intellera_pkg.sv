// intellera_pkg: types and constants shared by the Intellera RISC-V core
// and its matrix MAC unit.
//
// The ALU control codes and the MAC control codes are the 5-bit and 4-bit
// encodings listed in the instruction tables of the design (RISC-V subset and
// the custom MAC instruction set). The custom MAC opcode is 7'b1110111.
// MAC_NOP (4'b1111) is this design's own code for "no matrix operation",
// since 4'b0000 is already taken by LMAC A. The ResultSrc and ImmSrc encodings
// are this design's own choices.
package intellera_pkg;

  // Matrix geometry: 5 x 5 matrices of 32-bit words (25 registers each).
  localparam int unsigned MAT_DIM   = 5;

  // Opcodes
  localparam logic [6:0] OP_R     = 7'b0110011;
  localparam logic [6:0] OP_I     = 7'b0010011;
  localparam logic [6:0] OP_LOAD  = 7'b0000011;
  localparam logic [6:0] OP_STORE = 7'b0100011;
  localparam logic [6:0] OP_BR    = 7'b1100011;
  localparam logic [6:0] OP_JAL   = 7'b1101111;
  localparam logic [6:0] OP_JALR  = 7'b1100111;
  localparam logic [6:0] OP_LUI   = 7'b0110111;
  localparam logic [6:0] OP_MAC   = 7'b1110111;

  localparam logic [31:0] NOP_INSTR = 32'h0000_0013;  // addi x0, x0, 0

  // 5-bit ALU control
  typedef enum logic [4:0] {
    ALU_ADD  = 5'b00000,
    ALU_SUB  = 5'b00001,
    ALU_MUL  = 5'b00010,
    ALU_AND  = 5'b00011,
    ALU_OR   = 5'b00100,
    ALU_XOR  = 5'b00101,
    ALU_SLL  = 5'b00110,
    ALU_SRL  = 5'b00111,
    ALU_BGE  = 5'b01000,
    ALU_BEQ  = 5'b01001,
    ALU_BNE  = 5'b01010,
    ALU_BLT  = 5'b01011,
    ALU_SLT  = 5'b01100
  } alu_ctrl_e;

  // 4-bit MAC control
  typedef enum logic [3:0] {
    MAC_LOAD_A = 4'b0000,
    MAC_LOAD_B = 4'b0001,
    MAC_CLR_A  = 4'b0010,
    MAC_CLR_B  = 4'b0011,
    MAC_CLR_R  = 4'b0100,
    MAC_CLR_ALL= 4'b0101,
    MAC_MUL    = 4'b0110,
    MAC_ADD    = 4'b0111,
    MAC_SUB    = 4'b1000,
    MAC_RSUB   = 4'b1001,
    MAC_STR_R  = 4'b1010,
    MAC_NOP    = 4'b1111
  } mac_ctrl_e;

  // 2-bit MACDM: matrix transfer requested from data memory
  typedef enum logic [1:0] {
    MACDM_NONE   = 2'b00,
    MACDM_LOAD_A = 2'b01,
    MACDM_LOAD_B = 2'b10,
    MACDM_STORE_R= 2'b11
  } macdm_e;

  // Result select for write-back
  typedef enum logic [1:0] {
    RES_ALU = 2'b00,
    RES_MEM = 2'b01,
    RES_PC4 = 2'b10
  } res_src_e;

  // Immediate formats
  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_J = 3'd3,
    IMM_U = 3'd4
  } imm_src_e;

  // Control bundle produced in decode and carried down the pipeline
  typedef struct packed {
    logic      reg_write;
    res_src_e  result_src;
    logic      mem_write;
    logic      branch;
    logic      jump;
    logic      jalr;
    logic      alu_src;     // 1: immediate as ALU operand B
    imm_src_e  imm_src;
    alu_ctrl_e alu_ctrl;
    mac_ctrl_e mac_ctrl;
    macdm_e    macdm;
  } ctrl_t;

endpackage
