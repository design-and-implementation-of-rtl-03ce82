// Self-checking testbench for next_pc_logic.
//
// Random PCs, immediates, ALU results, flags and branch/jump controls are
// applied; the next PC, PC+4, the branch target and the chosen source are
// compared with a reference that evaluates each branch condition by name
// (beq, bne, blt, bge, bltu, bgeu).
module tb_next_pc_logic;
  import rv32m_pkg::*;

  logic [31:0] pc, imm, alu_result, pc_plus4, branch_target, next_pc;
  logic        branch, jump, jalr, zero, lt, ltu;
  logic [2:0]  funct3;
  pc_src_e     pc_src;
  int checks = 0, failures = 0;
  int taken_seen = 0, not_taken_seen = 0, jalr_seen = 0;

  next_pc_logic dut (.pc(pc), .imm(imm), .alu_result(alu_result), .branch(branch), .jump(jump),
                     .jalr(jalr), .funct3(funct3), .zero(zero), .lt(lt), .ltu(ltu),
                     .pc_plus4(pc_plus4), .branch_target(branch_target), .pc_src(pc_src),
                     .next_pc(next_pc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic take;
    logic [31:0] exp;
    for (int n = 0; n < 5000; n++) begin
      pc = $urandom & ~32'h3; imm = $urandom; alu_result = $urandom;
      zero = $urandom_range(0, 1); lt = $urandom_range(0, 1); ltu = $urandom_range(0, 1);
      funct3 = 3'($urandom);
      case ($urandom_range(0, 3))
        0: begin branch = 0; jump = 0; jalr = 0; end
        1: begin branch = 1; jump = 0; jalr = 0; end
        2: begin branch = 0; jump = 1; jalr = 0; end
        default: begin branch = 0; jump = 1; jalr = 1; end
      endcase
      #1;
      take = 0;
      if (branch) begin
        if (funct3 == 3'b000) take = zero;       // beq
        if (funct3 == 3'b001) take = ~zero;      // bne
        if (funct3 == 3'b100) take = lt;         // blt
        if (funct3 == 3'b101) take = ~lt;        // bge
        if (funct3 == 3'b110) take = ltu;        // bltu
        if (funct3 == 3'b111) take = ~ltu;       // bgeu
      end
      if (jump && jalr)        exp = alu_result & 32'hFFFF_FFFE;
      else if (jump || take)   exp = pc + imm;
      else                     exp = pc + 4;
      if (branch) begin if (take) taken_seen++; else not_taken_seen++; end
      if (jalr) jalr_seen++;
      checks++;
      if (next_pc !== exp || pc_plus4 !== pc + 4 || branch_target !== pc + imm) begin
        failures++;
        $display("FAIL pc=%h imm=%h br=%b j=%b jr=%b f3=%0d z=%b lt=%b ltu=%b next=%h exp=%h",
                 pc, imm, branch, jump, jalr, funct3, zero, lt, ltu, next_pc, exp);
      end
    end
    checks++;
    if (taken_seen == 0 || not_taken_seen == 0 || jalr_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
