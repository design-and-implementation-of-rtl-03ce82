// Instruction decoder.
//
// Cuts a 32-bit RISC-V instruction into its fixed fields (funct7 [31:25],
// rs2 [24:20], rs1 [19:15], funct3 [14:12], rd [11:7], opcode [6:0]) and
// classifies its format from the opcode: R (register ALU and M extension),
// I (immediate ALU, load, jalr), S (store), B (branch), U (lui, auipc) and
// J (jal). Any other opcode is reported as FMT_BAD. The format drives the
// immediate generator. The field outputs are plain wires from the
// instruction bits; only the format classification is logic. Purely
// combinational.
module instruction_decoder
  import rv32m_pkg::*;
(
  input  logic [31:0] instr,
  output decoded_t    dec
);

  always_comb begin
    dec.funct7 = instr[31:25];
    dec.rs2    = instr[24:20];
    dec.rs1    = instr[19:15];
    dec.funct3 = instr[14:12];
    dec.rd     = instr[11:7];
    dec.opcode = instr[6:0];
    unique case (instr[6:0])
      OPC_OP:                       dec.fmt = FMT_R;
      OPC_OP_IMM, OPC_LOAD, OPC_JALR: dec.fmt = FMT_I;
      OPC_STORE:                    dec.fmt = FMT_S;
      OPC_BRANCH:                   dec.fmt = FMT_B;
      OPC_LUI, OPC_AUIPC:           dec.fmt = FMT_U;
      OPC_JAL:                      dec.fmt = FMT_J;
      default:                      dec.fmt = FMT_BAD;
    endcase
  end

endmodule
