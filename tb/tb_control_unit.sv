// Self-checking testbench for control_unit.
//
// Applies every opcode with every funct3 and compares each control signal
// with the expected settings for R-type, I-type ALU, lw, sw, branches, jal,
// jalr, lui and auipc, and checks that everything else is flagged illegal
// with no write enabled.
module tb_control_unit;
  import rv32m_pkg::*;

  logic [6:0] opcode;
  logic [2:0] funct3;
  ctrl_t      ctrl;
  logic       illegal;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(opcode), .funct3(funct3), .ctrl(ctrl), .illegal(illegal));

  // expected: {reg_write, alu_src, mem_read, mem_write, mem_to_reg, branch, jump, jalr,
  //            alu_op[1:0], a_sel[1:0], illegal}
  function automatic logic [12:0] expected(logic [6:0] opc, logic [2:0] f3);
    case (opc)
      7'b0110011: return 13'b1_0_0_0_0_0_0_0_10_00_0;
      7'b0010011: return 13'b1_1_0_0_0_0_0_0_11_00_0;
      7'b0000011: return (f3 == 3'b010) ? 13'b1_1_1_0_1_0_0_0_00_00_0 : 13'b0_0_0_0_0_0_0_0_00_00_1;
      7'b0100011: return (f3 == 3'b010) ? 13'b0_1_0_1_0_0_0_0_00_00_0 : 13'b0_0_0_0_0_0_0_0_00_00_1;
      7'b1100011: return (f3 == 3'b010 || f3 == 3'b011) ? 13'b0_0_0_0_0_0_0_0_00_00_1
                                                         : 13'b0_0_0_0_0_1_0_0_01_00_0;
      7'b1101111: return 13'b1_0_0_0_0_0_1_0_00_00_0;
      7'b1100111: return (f3 == 3'b000) ? 13'b1_1_0_0_0_0_1_1_00_00_0 : 13'b0_0_0_0_0_0_0_0_00_00_1;
      7'b0110111: return 13'b1_1_0_0_0_0_0_0_00_10_0;
      7'b0010111: return 13'b1_1_0_0_0_0_0_0_00_01_0;
      default:    return 13'b0_0_0_0_0_0_0_0_00_00_1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] got, exp;
    for (int o = 0; o < 128; o++)
      for (int f = 0; f < 8; f++) begin
        opcode = 7'(o); funct3 = 3'(f);
        #1;
        exp = expected(opcode, funct3);
        got = {ctrl.reg_write, ctrl.alu_src, ctrl.mem_read, ctrl.mem_write, ctrl.mem_to_reg,
               ctrl.branch, ctrl.jump, ctrl.jalr, ctrl.alu_op, ctrl.a_sel, illegal};
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL opcode=%b f3=%0d got=%b exp=%b", opcode, funct3, got, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
