// Self-checking testbench for immediate_generator.
//
// Draws a random immediate, encodes it into a random instruction of each
// format the way an assembler would, and checks that the generator returns
// the same sign-extended value; R-type and unknown formats must give 0.
module tb_immediate_generator;
  import rv32m_pkg::*;

  logic [31:0] instr, imm;
  fmt_e        fmt;
  int checks = 0, failures = 0;

  immediate_generator dut (.instr(instr), .fmt(fmt), .imm(imm));

  task automatic check(logic [31:0] exp);
    #1;
    checks++;
    if (imm !== exp) begin
      failures++;
      $display("FAIL fmt=%0d instr=%h imm=%h exp=%h", fmt, instr, imm, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] r, v;
      r = $urandom;
      // I: 12-bit signed
      v = 32'($signed(12'($urandom)));
      instr = {v[11:0], r[19:0]}; fmt = FMT_I; check(v);
      // S
      v = 32'($signed(12'($urandom)));
      instr = {v[11:5], r[24:12], v[4:0], r[6:0]}; fmt = FMT_S; check(v);
      // B: 13-bit signed, even
      v = 32'($signed({12'($urandom), 1'b0}));
      instr = {v[12], v[10:5], r[24:12], v[4:1], v[11], r[6:0]}; fmt = FMT_B; check(v);
      // U
      v = {20'($urandom), 12'b0};
      instr = {v[31:12], r[11:0]}; fmt = FMT_U; check(v);
      // J: 21-bit signed, even
      v = 32'($signed({20'($urandom), 1'b0}));
      instr = {v[20], v[10:1], v[11], v[19:12], r[11:0]}; fmt = FMT_J; check(v);
      // R and bad
      instr = r; fmt = FMT_R; check(32'b0);
      fmt = FMT_BAD; check(32'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
