// Self-checking testbench for alu.
//
// Applies every operation to corner-case operand pairs (0, 1, -1, the most
// negative and most positive numbers, divide by zero, -2^31 / -1) and to
// random pairs, and compares result and flags with a reference computed
// here from 64-bit arithmetic and the RISC-V M rules.
module tb_alu;
  import rv32m_pkg::*;

  logic [31:0] a, b, result;
  alu_ctrl_e   op;
  logic        zero, lt, ltu;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctrl(op), .result(result), .zero(zero), .lt(lt), .ltu(ltu));

  function automatic logic [31:0] ref_alu(alu_ctrl_e o, logic [31:0] x, logic [31:0] y);
    longint sx, sy;
    longint unsigned ux, uy;
    longint p;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    ux = {32'b0, x};           uy = {32'b0, y};
    case (o)
      ALU_ADD:  return 32'(ux + uy);
      ALU_SUB:  return 32'(ux - uy);
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_XOR:  return x ^ y;
      ALU_SLL:  return 32'(ux << y[4:0]);
      ALU_SRL:  return 32'(ux >> y[4:0]);
      ALU_SRA:  return 32'(sx >>> y[4:0]);
      ALU_SLT:  return (sx < sy) ? 32'd1 : 32'd0;
      ALU_SLTU: return (ux < uy) ? 32'd1 : 32'd0;
      ALU_MUL:  begin p = sx * sy; return p[31:0]; end
      ALU_MULH: begin p = sx * sy; return p[63:32]; end
      ALU_MULHSU: begin p = sx * longint'({32'b0, y}); return p[63:32]; end
      ALU_MULHU: begin
        longint unsigned q;
        q = ux * uy;
        return q[63:32];
      end
      ALU_DIV:  return (y == 0) ? 32'hFFFF_FFFF : 32'(sx / sy);
      ALU_REM:  return (y == 0) ? x : 32'(sx % sy);
      ALU_DIVU: return (y == 0) ? 32'hFFFF_FFFF : 32'(ux / uy);
      ALU_REMU: return (y == 0) ? x : 32'(ux % uy);
      default:  return 32'hDEAD_BEEF;
    endcase
  endfunction

  task automatic try(alu_ctrl_e o, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = ref_alu(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0) ||
        lt !== ($signed(x) < $signed(y)) || ltu !== (x < y)) begin
      failures++;
      $display("FAIL %s a=%h b=%h result=%h exp=%h z=%b lt=%b ltu=%b",
               o.name(), x, y, result, exp, zero, lt, ltu);
    end
  endtask

  localparam alu_ctrl_e OPS [18] = '{ALU_ADD, ALU_SUB, ALU_MUL, ALU_MULH, ALU_DIV, ALU_REM,
                                     ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
                                     ALU_SLT, ALU_SLTU, ALU_MULHSU, ALU_MULHU, ALU_DIVU, ALU_REMU};
  localparam logic [31:0] CORNER [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                         32'h7FFF_FFFF, 32'h0000_0008, 32'hFFFF_FFF9};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (OPS[i])
      foreach (CORNER[j])
        foreach (CORNER[k])
          try(OPS[i], CORNER[j], CORNER[k]);
    for (int n = 0; n < 200; n++)
      foreach (OPS[i]) try(OPS[i], $urandom, $urandom);
    // small operands so that quotients and remainders are non-trivial
    for (int n = 0; n < 100; n++)
      foreach (OPS[i]) try(OPS[i], $urandom_range(0, 200) - 100, $urandom_range(0, 20) - 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
