// Self-checking testbench for instruction_decoder.
//
// Builds random instructions from independently drawn fields and checks
// that each field comes back unchanged and that the format matches the
// opcode (R, I, S, B, U, J, or bad for any other opcode).
module tb_instruction_decoder;
  import rv32m_pkg::*;

  logic [31:0] instr;
  decoded_t    dec;
  int checks = 0, failures = 0;

  instruction_decoder dut (.instr(instr), .dec(dec));

  localparam logic [6:0] OPCS [10] = '{7'h33, 7'h13, 7'h03, 7'h67, 7'h23, 7'h63,
                                       7'h37, 7'h17, 7'h6F, 7'h00};
  localparam fmt_e FMTS [10] = '{FMT_R, FMT_I, FMT_I, FMT_I, FMT_S, FMT_B,
                                 FMT_U, FMT_U, FMT_J, FMT_BAD};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] f7, opc; logic [4:0] r2, r1, rdv; logic [2:0] f3;
    fmt_e exp_fmt;
    for (int n = 0; n < 2000; n++) begin
      int k;
      k  = $urandom_range(0, 10);
      f7 = 7'($urandom); r2 = 5'($urandom); r1 = 5'($urandom);
      f3 = 3'($urandom); rdv = 5'($urandom);
      if (k < 10) begin opc = OPCS[k]; exp_fmt = FMTS[k]; end
      else begin
        opc = 7'($urandom);
        exp_fmt = FMT_BAD;
        foreach (OPCS[j]) if (OPCS[j] == opc) exp_fmt = FMTS[j];
      end
      instr = {f7, r2, r1, f3, rdv, opc};
      #1;
      checks++;
      if (dec.funct7 !== f7 || dec.rs2 !== r2 || dec.rs1 !== r1 || dec.funct3 !== f3 ||
          dec.rd !== rdv || dec.opcode !== opc || dec.fmt !== exp_fmt) begin
        failures++;
        $display("FAIL instr=%h fmt=%0d exp=%0d", instr, dec.fmt, exp_fmt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
