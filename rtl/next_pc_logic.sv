// Next-PC logic: PC+4 adder, branch-target adder, branch decision and the
// PC-source multiplexer.
//
// The PC normally advances by 4. A conditional branch whose condition holds
// (from the ALU flags of rs1 - rs2: zero, signed and unsigned less-than,
// chosen by funct3) and a JAL both go to PC + immediate. A JALR goes to
// the ALU result (rs1 + immediate) with bit 0 cleared. The two-way PCSrc
// choice of the classic datapath is extended to three ways for JALR, and
// the branch conditions beyond "equal" are this design's additions.
// Purely combinational.
module next_pc_logic
  import rv32m_pkg::*;
(
  input  logic [31:0] pc,
  input  logic [31:0] imm,
  input  logic [31:0] alu_result,
  input  logic        branch,
  input  logic        jump,
  input  logic        jalr,
  input  logic [2:0]  funct3,
  input  logic        zero,
  input  logic        lt,
  input  logic        ltu,
  output logic [31:0] pc_plus4,
  output logic [31:0] branch_target,
  output pc_src_e     pc_src,
  output logic [31:0] next_pc
);

  logic cond;
  logic [31:0] sources [3];

  assign pc_plus4      = pc + 32'd4;
  assign branch_target = pc + imm;

  always_comb begin
    unique case (funct3)
      3'b000:  cond = zero;   // beq
      3'b001:  cond = !zero;  // bne
      3'b100:  cond = lt;     // blt
      3'b101:  cond = !lt;    // bge
      3'b110:  cond = ltu;    // bltu
      3'b111:  cond = !ltu;   // bgeu
      default: cond = 1'b0;
    endcase
  end

  always_comb begin
    if (jump && jalr)                    pc_src = PCSRC_JALR;
    else if (jump || (branch && cond))   pc_src = PCSRC_TARGET;
    else                                 pc_src = PCSRC_PLUS4;
  end

  assign sources[0] = pc_plus4;
  assign sources[1] = branch_target;
  assign sources[2] = {alu_result[31:1], 1'b0};

  datapath_mux #(.WIDTH(32), .N(3)) u_pc_mux (
    .in  (sources),
    .sel (pc_src),
    .out (next_pc)
  );

endmodule
