// Self-checking testbench for alu_control.
//
// Walks every ALUOp with every funct3 and a set of funct7 values (the three
// legal ones and random others) and compares the operation code and the
// illegal flag with a table of RV32I/RV32M encodings kept in this file.
module tb_alu_control;
  import rv32m_pkg::*;

  alu_op_e     alu_op;
  logic [2:0]  funct3;
  logic [6:0]  funct7;
  alu_ctrl_e   alu_ctrl;
  logic        illegal;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op(alu_op), .funct3(funct3), .funct7(funct7),
                   .alu_ctrl(alu_ctrl), .illegal(illegal));

  // Reference: R-type table indexed by {funct7 class, funct3}
  function automatic void expect_r(logic [6:0] f7, logic [2:0] f3,
                                   output logic [4:0] code, output logic bad);
    bad = 0; code = 5'b00000;
    if (f7 == 7'h00) begin
      case (f3)
        0: code = 5'b00000; 1: code = 5'b01001; 2: code = 5'b01100; 3: code = 5'b01101;
        4: code = 5'b01000; 5: code = 5'b01010; 6: code = 5'b00111; 7: code = 5'b00110;
      endcase
    end else if (f7 == 7'h20) begin
      if (f3 == 0) code = 5'b00001;
      else if (f3 == 5) code = 5'b01011;
      else bad = 1;
    end else if (f7 == 7'h01) begin
      case (f3)
        0: code = 5'b00010; 1: code = 5'b00011; 2: code = 5'b01110; 3: code = 5'b01111;
        4: code = 5'b00100; 5: code = 5'b10000; 6: code = 5'b00101; 7: code = 5'b10001;
      endcase
    end else bad = 1;
  endfunction

  function automatic void expect_i(logic [6:0] f7, logic [2:0] f3,
                                   output logic [4:0] code, output logic bad);
    bad = 0; code = 5'b00000;
    case (f3)
      0: code = 5'b00000; 2: code = 5'b01100; 3: code = 5'b01101;
      4: code = 5'b01000; 6: code = 5'b00111; 7: code = 5'b00110;
      1: begin code = 5'b01001; bad = (f7 != 7'h00); end
      5: begin
        if (f7 == 7'h00) code = 5'b01010;
        else if (f7 == 7'h20) code = 5'b01011;
        else bad = 1;
      end
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] f7s [6];
    logic [4:0] exp_code;
    logic       exp_bad;
    f7s = '{7'h00, 7'h20, 7'h01, 7'h7F, 7'h02, 7'h40};
    for (int op = 0; op < 4; op++)
      for (int f3 = 0; f3 < 8; f3++)
        foreach (f7s[k]) begin
          alu_op = alu_op_e'(op); funct3 = 3'(f3); funct7 = f7s[k];
          #1;
          case (op)
            0: begin exp_code = 5'b00000; exp_bad = 0; end
            1: begin exp_code = 5'b00001; exp_bad = 0; end
            2: expect_r(funct7, funct3, exp_code, exp_bad);
            default: expect_i(funct7, funct3, exp_code, exp_bad);
          endcase
          checks++;
          if (exp_bad ? (illegal !== 1'b1) : (illegal !== 1'b0 || alu_ctrl !== exp_code)) begin
            failures++;
            $display("FAIL aluop=%0d f3=%0d f7=%h got %b/%b exp %b/%b",
                     op, f3, funct7, alu_ctrl, illegal, exp_code, exp_bad);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
