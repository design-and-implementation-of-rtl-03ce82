// Main control unit.
//
// Decodes the opcode into the datapath control signals:
//   reg_write  - write the write-back value into rd
//   alu_src    - second ALU operand is the immediate (else rs2)
//   mem_read   - data memory drives its read data
//   mem_write  - data memory stores rs2 at the ALU address
//   mem_to_reg - write-back value comes from the data memory (else ALU)
//   branch     - conditional branch, taken on the ALU compare flags
//   jump, jalr - unconditional jump; rd gets PC+4
//   alu_op     - 00 add (address), 01 subtract (branch compare),
//                10 R-type (funct fields decide), 11 I-type ALU
//   a_sel      - first ALU operand: rs1, PC (auipc) or zero (lui)
// The first six signals and ALUOp 00/01/10 follow the classic single-cycle
// RISC-V control; ALUOp 11, jump, jalr and a_sel are this design's additions
// for the immediate ALU group, jal/jalr and lui/auipc. Only word loads and
// stores (funct3 = 010), the six branch conditions and jalr with
// funct3 = 000 are accepted. An unsupported opcode deasserts
// every write and raises illegal, so it executes as a no-op.
// Purely combinational.
module control_unit
  import rv32m_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  output ctrl_t      ctrl,
  output logic       illegal
);

  always_comb begin
    ctrl    = '{alu_op: ALUOP_ADD, a_sel: ASEL_RS1, default: 1'b0};
    illegal = 1'b0;
    unique case (opcode)
      OPC_OP: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_RTYPE;
      end
      OPC_OP_IMM: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.alu_op    = ALUOP_ITYPE;
      end
      OPC_LOAD: begin
        if (funct3 == F3_WORD) begin
          ctrl.reg_write  = 1'b1;
          ctrl.alu_src    = 1'b1;
          ctrl.mem_read   = 1'b1;
          ctrl.mem_to_reg = 1'b1;
        end else begin
          illegal = 1'b1;
        end
      end
      OPC_STORE: begin
        if (funct3 == F3_WORD) begin
          ctrl.alu_src   = 1'b1;
          ctrl.mem_write = 1'b1;
        end else begin
          illegal = 1'b1;
        end
      end
      OPC_BRANCH: begin
        if (funct3[2:1] != 2'b01) begin
          ctrl.branch = 1'b1;
          ctrl.alu_op = ALUOP_BRANCH;
        end else begin
          illegal = 1'b1;
        end
      end
      OPC_JAL: begin
        ctrl.reg_write = 1'b1;
        ctrl.jump      = 1'b1;
      end
      OPC_JALR: begin
        if (funct3 == 3'b000) begin
          ctrl.reg_write = 1'b1;
          ctrl.jump      = 1'b1;
          ctrl.jalr      = 1'b1;
          ctrl.alu_src   = 1'b1;
        end else begin
          illegal = 1'b1;
        end
      end
      OPC_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.a_sel     = ASEL_ZERO;
      end
      OPC_AUIPC: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.a_sel     = ASEL_PC;
      end
      default: illegal = 1'b1;
    endcase
  end

endmodule
