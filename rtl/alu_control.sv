// ALU control.
//
// Turns the two-bit ALUOp of the main control, together with funct7 and
// funct3 of the instruction, into the ALU operation code:
//   ALUOp 00 -> add (load/store/jump address, lui, auipc)
//   ALUOp 01 -> subtract (branch compare)
//   ALUOp 10 -> R-type: funct7 0000000 selects the base operations,
//               0100000 sub/sra, 0000001 the M extension
//               (mul, mulh, mulhsu, mulhu, div, divu, rem, remu)
//   ALUOp 11 -> I-type: funct3 alone, except the shifts, whose funct7 must
//               be 0000000 (slli, srli) or 0100000 (srai)
// The add/sub/mul/div/rem/and/or/xor codes and their funct values follow the
// classic ALU-control table; ALUOp 11 and the other operations are this
// design's completion of it to all of RV32I's ALU group and RV32M. A funct
// combination outside the set raises illegal (the code is then add).
// Purely combinational.
module alu_control
  import rv32m_pkg::*;
(
  input  alu_op_e    alu_op,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output alu_ctrl_e  alu_ctrl,
  output logic       illegal
);

  always_comb begin
    alu_ctrl = ALU_ADD;
    illegal  = 1'b0;
    unique case (alu_op)
      ALUOP_ADD:    alu_ctrl = ALU_ADD;
      ALUOP_BRANCH: alu_ctrl = ALU_SUB;
      ALUOP_RTYPE: begin
        unique case (funct7)
          F7_BASE: begin
            unique case (funct3)
              3'b000: alu_ctrl = ALU_ADD;
              3'b001: alu_ctrl = ALU_SLL;
              3'b010: alu_ctrl = ALU_SLT;
              3'b011: alu_ctrl = ALU_SLTU;
              3'b100: alu_ctrl = ALU_XOR;
              3'b101: alu_ctrl = ALU_SRL;
              3'b110: alu_ctrl = ALU_OR;
              3'b111: alu_ctrl = ALU_AND;
            endcase
          end
          F7_ALT: begin
            if (funct3 == 3'b000)      alu_ctrl = ALU_SUB;
            else if (funct3 == 3'b101) alu_ctrl = ALU_SRA;
            else                       illegal  = 1'b1;
          end
          F7_MULDIV: begin
            unique case (funct3)
              3'b000: alu_ctrl = ALU_MUL;
              3'b001: alu_ctrl = ALU_MULH;
              3'b010: alu_ctrl = ALU_MULHSU;
              3'b011: alu_ctrl = ALU_MULHU;
              3'b100: alu_ctrl = ALU_DIV;
              3'b101: alu_ctrl = ALU_DIVU;
              3'b110: alu_ctrl = ALU_REM;
              3'b111: alu_ctrl = ALU_REMU;
            endcase
          end
          default: illegal = 1'b1;
        endcase
      end
      ALUOP_ITYPE: begin
        unique case (funct3)
          3'b000: alu_ctrl = ALU_ADD;
          3'b010: alu_ctrl = ALU_SLT;
          3'b011: alu_ctrl = ALU_SLTU;
          3'b100: alu_ctrl = ALU_XOR;
          3'b110: alu_ctrl = ALU_OR;
          3'b111: alu_ctrl = ALU_AND;
          3'b001: begin
            alu_ctrl = ALU_SLL;
            illegal  = (funct7 != F7_BASE);
          end
          3'b101: begin
            if (funct7 == F7_BASE)     alu_ctrl = ALU_SRL;
            else if (funct7 == F7_ALT) alu_ctrl = ALU_SRA;
            else                       illegal  = 1'b1;
          end
        endcase
      end
    endcase
  end

endmodule
