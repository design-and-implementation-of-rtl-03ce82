// Arithmetic logic unit with the RISC-V M extension.
//
// Computes, in one combinational pass, the operation selected by alu_ctrl
// on operand 1 (a) and operand 2 (b): add, sub, and, or, xor, the three
// shifts (by b[4:0]), signed and unsigned set-less-than, the low product
// (mul), the high product for signed x signed, signed x unsigned and
// unsigned x unsigned (mulh, mulhsu, mulhu), and signed and unsigned
// quotient and remainder (div, divu, rem, remu). Division by zero gives a
// quotient of all ones and returns the dividend as remainder; the signed
// overflow case -2^31 / -1 gives -2^31 with remainder 0, as the RISC-V M
// specification defines. The flags compare the operands for the branch
// unit: zero (result == 0, used with subtract for beq/bne), lt (a < b
// signed) and ltu (a < b unsigned).
module alu
  import rv32m_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctrl_e   alu_ctrl,
  output logic [31:0] result,
  output logic        zero,
  output logic        lt,
  output logic        ltu
);

  logic signed [63:0] prod_ss;
  logic signed [63:0] prod_su;
  logic        [63:0] prod_uu;
  logic               div_by_zero;
  logic               div_ovf;
  logic        [31:0] quot_s, rem_s, quot_u, rem_u;

  // Products: operands extended to 64 bits according to their signedness.
  assign prod_ss = {{32{a[31]}}, a} * {{32{b[31]}}, b};
  assign prod_su = {{32{a[31]}}, a} * {32'b0, b};
  assign prod_uu = {32'b0, a} * {32'b0, b};

  assign div_by_zero = (b == 32'b0);
  assign div_ovf     = (a == 32'h8000_0000) && (b == 32'hFFFF_FFFF);

  always_comb begin
    if (div_by_zero) begin
      quot_s = 32'hFFFF_FFFF;
      rem_s  = a;
      quot_u = 32'hFFFF_FFFF;
      rem_u  = a;
    end else begin
      quot_u = a / b;
      rem_u  = a % b;
      if (div_ovf) begin
        quot_s = 32'h8000_0000;
        rem_s  = 32'b0;
      end else begin
        quot_s = 32'($signed(a) / $signed(b));
        rem_s  = 32'($signed(a) % $signed(b));
      end
    end
  end

  always_comb begin
    unique case (alu_ctrl)
      ALU_ADD:    result = a + b;
      ALU_SUB:    result = a - b;
      ALU_AND:    result = a & b;
      ALU_OR:     result = a | b;
      ALU_XOR:    result = a ^ b;
      ALU_SLL:    result = a << b[4:0];
      ALU_SRL:    result = a >> b[4:0];
      ALU_SRA:    result = 32'($signed(a) >>> b[4:0]);
      ALU_SLT:    result = {31'b0, lt};
      ALU_SLTU:   result = {31'b0, ltu};
      ALU_MUL:    result = prod_uu[31:0];
      ALU_MULH:   result = prod_ss[63:32];
      ALU_MULHSU: result = prod_su[63:32];
      ALU_MULHU:  result = prod_uu[63:32];
      ALU_DIV:    result = quot_s;
      ALU_DIVU:   result = quot_u;
      ALU_REM:    result = rem_s;
      ALU_REMU:   result = rem_u;
      default:    result = 32'b0;
    endcase
  end

  assign lt   = $signed(a) < $signed(b);
  assign ltu  = a < b;
  assign zero = (result == 32'b0);

endmodule
