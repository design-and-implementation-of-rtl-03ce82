// Self-checking testbench for register_file.
//
// After reset, performs random writes and reads on both ports and compares
// with a model array: reads are combinational, a write shows on the next
// cycle, x0 always reads zero, and we=0 leaves the registers unchanged.
module tb_register_file;
  logic clk = 0, rst;
  logic [4:0] rs1, rs2, rd;
  logic we;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst(rst), .rs1(rs1), .rs2(rs2), .rd(rd), .we(we), .wd(wd),
                     .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; rs1 = 0; rs2 = 0; rd = 0; wd = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      // drive a random cycle
      rs1 = 5'($urandom); rs2 = 5'($urandom);
      rd = 5'($urandom); we = ($urandom_range(0, 3) != 0); wd = $urandom;
      #1;
      checks++;
      if (rd1 !== model[rs1] || rd2 !== model[rs2]) begin
        failures++;
        $display("FAIL rs1=%0d rd1=%h exp=%h rs2=%0d rd2=%h exp=%h",
                 rs1, rd1, model[rs1], rs2, rd2, model[rs2]);
      end
      @(posedge clk);
      if (we && rd != 0) model[rd] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
