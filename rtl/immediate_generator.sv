// Immediate generator.
//
// Assembles the 32-bit immediate of an instruction from the bits its format
// scatters them over, sign-extending from instr[31]:
//   I: instr[31:20]                                  (12 bits)
//   S: instr[31:25], instr[11:7]                     (12 bits)
//   B: instr[31], instr[7], instr[30:25], instr[11:8], 0   (13 bits)
//   U: instr[31:12], twelve zeros
//   J: instr[31], instr[19:12], instr[20], instr[30:21], 0 (21 bits)
// R-type and unknown formats give 0. Purely combinational.
module immediate_generator
  import rv32m_pkg::*;
(
  input  logic [31:0] instr,
  input  fmt_e        fmt,
  output logic [31:0] imm
);

  always_comb begin
    unique case (fmt)
      FMT_I:   imm = {{20{instr[31]}}, instr[31:20]};
      FMT_S:   imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      FMT_B:   imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      FMT_U:   imm = {instr[31:12], 12'b0};
      FMT_J:   imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = 32'b0;
    endcase
  end

endmodule
