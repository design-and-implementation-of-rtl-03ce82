// Self-checking testbench for program_counter.
//
// Checks that reset loads 0, that the PC takes next_pc at each rising edge
// and holds it between edges, and that reset wins over next_pc.
module tb_program_counter;
  logic clk = 0, rst;
  logic [31:0] next_pc, pc;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .next_pc(next_pc), .pc(pc));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] exp);
    checks++;
    if (pc !== exp) begin
      failures++;
      $display("FAIL pc=%h exp=%h", pc, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, prev;
    rst = 1; next_pc = 32'h1234_5678;
    @(posedge clk); #1 check(32'h0);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      v = $urandom;
      prev = pc;
      next_pc = v;
      #2 check(prev);                         // no change between edges
      @(posedge clk); #1 check(v);
      if (n % 50 == 49) begin
        rst = 1; next_pc = $urandom;
        @(posedge clk); #1 check(32'h0);
        rst = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
