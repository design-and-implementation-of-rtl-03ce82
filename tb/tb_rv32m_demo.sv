// Runs the processor's default program (the instruction ROM contents at
// reset) and checks it cycle by cycle.
//
// The program sets x1 = 4 and x2 = 8, then runs add, sub, mulh, mul, div,
// rem, a store and a load, and, or, xor, sll, srl and sra on them, and ends
// in a jump-to-self. The expected value of every register write was worked
// out by hand and is listed below. The testbench checks that the PC
// advances by exactly 4 each clock (one instruction per cycle), that each
// instruction writes the expected value, that the store and the load are
// the only memory accesses and happen in their own cycles, and the final
// register contents.
module tb_rv32m_demo;
  logic clk = 0, rst = 1;
  logic [31:0] pc_address, instruction, next_pc, operand_a, operand_b_mux, alu_result;
  logic [31:0] data_write, read_data, write_data;
  logic        mem_read, mem_write, reg_write, illegal_instr;
  int checks = 0, failures = 0;

  rv32m_top dut (.*);

  always #5 clk = ~clk;

  // per instruction: expected reg_write, write-back value
  localparam int N = 18;
  localparam logic        EXP_WE  [N] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 1, 1, 1, 1, 1, 1, 1, 1};
  localparam logic [31:0] EXP_VAL [N] = '{
    32'h0,          // addi x0,x0,0
    32'd4,          // addi x1,x0,4
    32'd8,          // addi x2,x0,8
    32'd12,         // add  x3 = 4+8
    32'hFFFF_FFFC,  // sub  x4 = 4-8
    32'h0,          // mulh x4 = upper(4*8)
    32'd32,         // mul  x5 = 4*8
    32'd0,          // div  x6 = 4/8
    32'd4,          // rem  x7 = 4%8
    32'h0,          // sw   x6 -> 0(x5)   (no register write)
    32'h0,          // lw   x6 <- 0(x1)   (memory is zero)
    32'd0,          // and  x5 = 4&8
    32'd12,         // or   x6 = 4|8
    32'd12,         // xor  x7 = 4^8
    32'd1024,       // sll  x6 = 4<<8
    32'd0,          // srl  x7 = 4>>8
    32'd0,          // sra  x8 = 4>>>8
    32'h48};        // jal  x0,0 (link value discarded)

  task automatic check(logic ok, string what, int i);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at instruction %0d (pc=%h)", what, i, pc_address);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    #1;
    for (int i = 0; i < N + 3; i++) begin
      int k;
      k = (i < N) ? i : N - 1;               // stays on the final jump-to-self
      check(pc_address == 32'(4 * k), "one instruction per cycle", i);
      check(next_pc == ((k == N - 1) ? 32'(4 * k) : 32'(4 * k + 4)), "next_pc", i);
      check(reg_write == EXP_WE[k], "reg_write", i);
      if (EXP_WE[k]) check(write_data == EXP_VAL[k], "write-back value", i);
      check(mem_write == (k == 9), "mem_write only for sw", i);
      check(mem_read == (k == 10), "mem_read only for lw", i);
      if (k == 9)  check(alu_result == 32'd32 && data_write == 32'd0, "store address/data", i);
      if (k == 10) check(alu_result == 32'd4 && read_data == 32'd0, "load address/data", i);
      check(!illegal_instr, "no unsupported instruction", i);
      @(negedge clk);
    end
    begin
      logic [31:0] exp_regs [9];
      exp_regs = '{0, 4, 8, 12, 0, 0, 1024, 0, 0};
      for (int r = 0; r < 9; r++) check(dut.u_rf.regs[r] == exp_regs[r], "final register", r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
