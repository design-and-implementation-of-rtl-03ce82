// Shared types and constants of the single-cycle RV32M processor.
//
// Holds the RISC-V opcodes the design decodes, the instruction-format and
// operand-select enums, the ALU operation codes and the two structs that
// travel between the decoder, the control unit and the datapath.
//
// The low ALU codes are the 4-bit "ALU control input" values of the
// classic ALU-control table (add 0000, sub 0001, mul 0010, div 0100,
// rem 0101, and 0110, or 0111, xor 1000). The code is widened to five bits
// here so that the remaining RV32I/RV32M operations (shifts, set-less-than,
// the high multiplies and the unsigned divides) get codes of their own;
// those extra codes are this design's choice.
package rv32m_pkg;

  localparam int XLEN = 32;

  // Major opcodes (instr[6:0])
  localparam logic [6:0] OPC_OP     = 7'b0110011;  // R-type ALU, incl. M extension
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;  // I-type ALU
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;

  localparam logic [6:0] F7_BASE = 7'b0000000;
  localparam logic [6:0] F7_ALT  = 7'b0100000;  // sub, sra
  localparam logic [6:0] F7_MULDIV = 7'b0000001;

  localparam logic [2:0] F3_WORD = 3'b010;      // lw / sw

  localparam logic [31:0] NOP_INSTR = 32'h0000_0013;  // addi x0, x0, 0

  typedef enum logic [2:0] {
    FMT_R   = 3'd0,
    FMT_I   = 3'd1,
    FMT_S   = 3'd2,
    FMT_B   = 3'd3,
    FMT_U   = 3'd4,
    FMT_J   = 3'd5,
    FMT_BAD = 3'd7
  } fmt_e;

  // ALUOp from the main control to the ALU control
  typedef enum logic [1:0] {
    ALUOP_ADD    = 2'b00,  // address calculation (load, store, jalr, lui, auipc)
    ALUOP_BRANCH = 2'b01,  // compare by subtraction
    ALUOP_RTYPE  = 2'b10,  // decided by funct7/funct3
    ALUOP_ITYPE  = 2'b11   // decided by funct3 (and funct7 for shifts)
  } alu_op_e;

  typedef enum logic [4:0] {
    ALU_ADD    = 5'b00000,
    ALU_SUB    = 5'b00001,
    ALU_MUL    = 5'b00010,
    ALU_MULH   = 5'b00011,
    ALU_DIV    = 5'b00100,
    ALU_REM    = 5'b00101,
    ALU_AND    = 5'b00110,
    ALU_OR     = 5'b00111,
    ALU_XOR    = 5'b01000,
    ALU_SLL    = 5'b01001,
    ALU_SRL    = 5'b01010,
    ALU_SRA    = 5'b01011,
    ALU_SLT    = 5'b01100,
    ALU_SLTU   = 5'b01101,
    ALU_MULHSU = 5'b01110,
    ALU_MULHU  = 5'b01111,
    ALU_DIVU   = 5'b10000,
    ALU_REMU   = 5'b10001
  } alu_ctrl_e;

  // Operand-1 select of the ALU
  typedef enum logic [1:0] {
    ASEL_RS1  = 2'd0,
    ASEL_PC   = 2'd1,
    ASEL_ZERO = 2'd2
  } asel_e;

  // Register write-back select
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_PC4 = 2'd2
  } wb_sel_e;

  // Next-PC select
  typedef enum logic [1:0] {
    PCSRC_PLUS4  = 2'd0,
    PCSRC_TARGET = 2'd1,  // pc + imm (taken branch, jal)
    PCSRC_JALR   = 2'd2   // (rs1 + imm) & ~1
  } pc_src_e;

  typedef struct packed {
    logic [6:0] funct7;
    logic [4:0] rs2;
    logic [4:0] rs1;
    logic [2:0] funct3;
    logic [4:0] rd;
    logic [6:0] opcode;
    fmt_e       fmt;
  } decoded_t;

  typedef struct packed {
    logic    reg_write;
    logic    alu_src;    // 1: operand 2 is the immediate
    logic    mem_read;
    logic    mem_write;
    logic    mem_to_reg;
    logic    branch;
    logic    jump;       // jal or jalr: write pc+4, redirect PC
    logic    jalr;
    alu_op_e alu_op;
    asel_e   a_sel;
  } ctrl_t;

endpackage
