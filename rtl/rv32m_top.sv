// Single-cycle RV32M processor.
//
// Every instruction is fetched, decoded, executed and written back within
// one clock cycle. The PC addresses the instruction ROM; the decoder splits
// the instruction into its fields, the control unit derives the control
// signals from the opcode, and the immediate generator builds the
// immediate. The register file supplies rs1 and rs2; multiplexers pick the
// ALU operands (rs1, PC or zero; rs2 or immediate). The ALU, controlled by
// the ALU-control block from ALUOp, funct7 and funct3, performs RV32I ALU
// operations and the RV32M multiply/divide. Its result is the data-memory
// address for loads and stores, the jump target for jalr, or the value to
// write back. A third multiplexer chooses the write-back value (ALU, memory
// or PC+4) and the next-PC logic picks PC+4, PC+immediate or the jalr
// target at the clock edge, when the PC, the register file and the data
// memory are all updated.
//
// Interface: clk, synchronous active-high rst (PC and registers to 0); all
// other ports are observation outputs named after the signals one watches
// in simulation (pc_address, instruction, operand_a, operand_b_mux,
// alu_result, data_write, read_data, write_data, mem_read, mem_write,
// reg_write, next_pc) plus illegal_instr for an unsupported encoding, which
// is executed as a no-op (no register or memory write, PC+4).
//
// The datapath and the control signals follow the classic single-cycle
// RISC-V organisation; the instruction subset beyond add/sub/and/or/xor/
// mul/div/rem, lw/sw and beq (the other RV32I ALU operations, branches,
// jal, jalr, lui, auipc and the remaining M operations), the memory sizes
// and the reset are this design's choices.
module rv32m_top
  import rv32m_pkg::*;
#(
  parameter int    IMEM_DEPTH     = 256,
  parameter int    DMEM_DEPTH     = 256,
  parameter string IMEM_INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pc_address,
  output logic [31:0] instruction,
  output logic [31:0] next_pc,
  output logic [31:0] operand_a,
  output logic [31:0] operand_b_mux,
  output logic [31:0] alu_result,
  output logic [31:0] data_write,
  output logic [31:0] read_data,
  output logic [31:0] write_data,
  output logic        mem_read,
  output logic        mem_write,
  output logic        reg_write,
  output logic        illegal_instr
);

  decoded_t    dec;
  ctrl_t       ctrl;
  alu_ctrl_e   alu_ctrl;
  logic        ctrl_illegal, alu_illegal;
  logic [31:0] imm, rs1_data, rs2_data;
  logic        zero, lt, ltu;
  logic [31:0] pc_plus4, branch_target;
  pc_src_e     pc_src;
  logic [31:0] a_sources [3];
  logic [31:0] b_sources [2];
  logic [31:0] wb_sources [3];
  logic [1:0]  wb_sel;

  // ---------------- fetch ----------------
  program_counter u_pc (
    .clk     (clk),
    .rst     (rst),
    .next_pc (next_pc),
    .pc      (pc_address)
  );

  instruction_memory #(.DEPTH(IMEM_DEPTH), .INIT_FILE(IMEM_INIT_FILE)) u_imem (
    .addr  (pc_address),
    .instr (instruction)
  );

  // ---------------- decode ----------------
  instruction_decoder u_dec (
    .instr (instruction),
    .dec   (dec)
  );

  control_unit u_ctrl (
    .opcode  (dec.opcode),
    .funct3  (dec.funct3),
    .ctrl    (ctrl),
    .illegal (ctrl_illegal)
  );

  immediate_generator u_immgen (
    .instr (instruction),
    .fmt   (dec.fmt),
    .imm   (imm)
  );

  alu_control u_aluctl (
    .alu_op   (ctrl.alu_op),
    .funct3   (dec.funct3),
    .funct7   (dec.funct7),
    .alu_ctrl (alu_ctrl),
    .illegal  (alu_illegal)
  );

  assign illegal_instr = ctrl_illegal || alu_illegal;
  assign reg_write     = ctrl.reg_write && !illegal_instr;
  assign mem_write     = ctrl.mem_write && !illegal_instr;
  assign mem_read      = ctrl.mem_read  && !illegal_instr;

  register_file #(.NREGS(32), .XLEN(32)) u_rf (
    .clk (clk),
    .rst (rst),
    .rs1 (dec.rs1),
    .rs2 (dec.rs2),
    .rd  (dec.rd),
    .we  (reg_write),
    .wd  (write_data),
    .rd1 (rs1_data),
    .rd2 (rs2_data)
  );

  // ---------------- execute ----------------
  assign a_sources[ASEL_RS1]  = rs1_data;
  assign a_sources[ASEL_PC]   = pc_address;
  assign a_sources[ASEL_ZERO] = 32'b0;

  datapath_mux #(.WIDTH(32), .N(3)) u_amux (
    .in  (a_sources),
    .sel (ctrl.a_sel),
    .out (operand_a)
  );

  assign b_sources[0] = rs2_data;
  assign b_sources[1] = imm;

  datapath_mux #(.WIDTH(32), .N(2)) u_bmux (   // ALUSrc
    .in  (b_sources),
    .sel (ctrl.alu_src),
    .out (operand_b_mux)
  );

  alu u_alu (
    .a        (operand_a),
    .b        (operand_b_mux),
    .alu_ctrl (alu_ctrl),
    .result   (alu_result),
    .zero     (zero),
    .lt       (lt),
    .ltu      (ltu)
  );

  next_pc_logic u_npc (
    .pc            (pc_address),
    .imm           (imm),
    .alu_result    (alu_result),
    .branch        (ctrl.branch && !illegal_instr),
    .jump          (ctrl.jump && !illegal_instr),
    .jalr          (ctrl.jalr),
    .funct3        (dec.funct3),
    .zero          (zero),
    .lt            (lt),
    .ltu           (ltu),
    .pc_plus4      (pc_plus4),
    .branch_target (branch_target),
    .pc_src        (pc_src),
    .next_pc       (next_pc)
  );

  // ---------------- memory ----------------
  assign data_write = rs2_data;

  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk        (clk),
    .mem_read   (mem_read),
    .mem_write  (mem_write),
    .addr       (alu_result),
    .write_data (data_write),
    .read_data  (read_data)
  );

  // A single-port data memory is either read or written in a cycle.
  a_mem_exclusive : assert property (@(posedge clk) disable iff (rst) !(mem_read && mem_write))
    else $error("data memory read and written in the same cycle");

  // ---------------- write-back ----------------
  assign wb_sel = ctrl.jump       ? WB_PC4 :
                  ctrl.mem_to_reg ? WB_MEM : WB_ALU;

  assign wb_sources[WB_ALU] = alu_result;
  assign wb_sources[WB_MEM] = read_data;
  assign wb_sources[WB_PC4] = pc_plus4;

  datapath_mux #(.WIDTH(32), .N(3)) u_wbmux (   // MemtoReg / link
    .in  (wb_sources),
    .sel (wb_sel),
    .out (write_data)
  );

endmodule
