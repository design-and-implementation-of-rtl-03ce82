// End-to-end testbench for rv32m_top at its default parameters.
//
// Generates random programs of RV32I/RV32M instructions (register and
// immediate ALU operations, multiply, divide and remainder with divisors
// that include zero, lw/sw, all six branch conditions, jal, jalr, lui,
// auipc and a few unsupported encodings), places each in the instruction
// ROM and runs it from reset. All control flow goes forward, so each
// program ends in its final jump-to-self. A reference instruction-set model
// in this file executes the same program one instruction per clock; before
// every rising edge the testbench compares the PC, next PC, register write
// enable and value, and the data-memory access with the model, which also
// checks that every instruction takes exactly one cycle. At the end of each
// program all 32 registers are compared. The testbench counts how often
// each mechanism happened (taken and not-taken branches, jumps, loads,
// stores, M operations, division by zero, writes to x0, unsupported
// encodings) and counts a failure for any that never happened.
module tb_rv32m_top;
  localparam int IMEM_WORDS = 256;
  localparam int DMEM_WORDS = 256;
  localparam int PROG_LEN   = 240;
  localparam int NPROGS     = 40;

  logic clk = 0, rst = 1;
  logic [31:0] pc_address, instruction, next_pc, operand_a, operand_b_mux, alu_result;
  logic [31:0] data_write, read_data, write_data;
  logic        mem_read, mem_write, reg_write, illegal_instr;

  rv32m_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {M_BR_TAKEN, M_BR_NOT, M_JAL, M_JALR, M_LOAD, M_STORE, M_MUL, M_DIV,
                    M_DIV0, M_X0WRITE, M_ILLEGAL, M_LUI, M_AUIPC, M_IMM, M_SHIFT, M_NUM} mech_e;
  int seen [M_NUM];

  // ---------------- encoders ----------------
  function automatic logic [31:0] enc_r(int f7, int rs2, int rs1, int f3, int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'h33};
  endfunction
  function automatic logic [31:0] enc_i(int imm, int rs1, int f3, int rd, logic [6:0] opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), opc};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1);
    logic [11:0] v = 12'(imm);
    return {v[11:5], 5'(rs2), 5'(rs1), 3'b010, v[4:0], 7'h23};
  endfunction
  function automatic logic [31:0] enc_b(int off, int rs2, int rs1, int f3);
    logic [12:0] v = 13'(off);
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), 3'(f3), v[4:1], v[11], 7'h63};
  endfunction
  function automatic logic [31:0] enc_j(int off, int rd);
    logic [20:0] v = 21'(off);
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'h6F};
  endfunction

  // ---------------- reference model ----------------
  logic [31:0] prog  [IMEM_WORDS];
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DMEM_WORDS];
  logic [31:0] m_pc;

  typedef struct {
    logic [31:0] next_pc;
    logic        wr;        // instruction writes rd (possibly x0)
    logic [31:0] wval;
    logic        st, ld;
    logic [31:0] addr;
    logic [31:0] sdata;
    logic        illegal;
  } step_t;

  function automatic logic [31:0] sext(logic [31:0] v, int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  function automatic step_t model_step(logic [31:0] ins);
    step_t s;
    logic [6:0] opc = ins[6:0];
    logic [2:0] f3 = ins[14:12];
    logic [6:0] f7 = ins[31:25];
    logic [31:0] x1v = m_reg[ins[19:15]];
    logic [31:0] x2v = m_reg[ins[24:20]];
    logic [31:0] immi = sext({20'b0, ins[31:20]}, 12);
    logic [31:0] imms = sext({20'b0, ins[31:25], ins[11:7]}, 12);
    logic [31:0] immb = sext({19'b0, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0}, 13);
    logic [31:0] immj = sext({11'b0, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0}, 21);
    longint sa = longint'($signed(x1v)), sb = longint'($signed(x2v));
    longint ua = longint'({32'b0, x1v}), ub = longint'({32'b0, x2v});
    longint p;
    s = '{next_pc: m_pc + 4, wr: 0, wval: 0, st: 0, ld: 0, addr: 0, sdata: 0, illegal: 0};
    case (opc)
      7'h33: begin
        s.wr = 1;
        if (f7 == 7'h01) begin
          case (f3)
            0: begin p = sa * sb; s.wval = p[31:0]; end
            1: begin p = sa * sb; s.wval = p[63:32]; end
            2: begin p = sa * ub; s.wval = p[63:32]; end
            3: begin p = ua * ub; s.wval = p[63:32]; end
            4: s.wval = (x2v == 0) ? '1 : 32'(sa / sb);
            5: s.wval = (x2v == 0) ? '1 : 32'(ua / ub);
            6: s.wval = (x2v == 0) ? x1v : 32'(sa % sb);
            7: s.wval = (x2v == 0) ? x1v : 32'(ua % ub);
          endcase
        end else if (f7 == 7'h00) begin
          case (f3)
            0: s.wval = x1v + x2v;
            1: s.wval = x1v << x2v[4:0];
            2: s.wval = 32'(sa < sb);
            3: s.wval = 32'(x1v < x2v);
            4: s.wval = x1v ^ x2v;
            5: s.wval = x1v >> x2v[4:0];
            6: s.wval = x1v | x2v;
            7: s.wval = x1v & x2v;
          endcase
        end else if (f7 == 7'h20 && f3 == 0) s.wval = x1v - x2v;
        else if (f7 == 7'h20 && f3 == 5) s.wval = 32'(sa >>> x2v[4:0]);
        else s.illegal = 1;
      end
      7'h13: begin
        s.wr = 1;
        case (f3)
          0: s.wval = x1v + immi;
          2: s.wval = 32'(sa < longint'($signed(immi)));
          3: s.wval = 32'(x1v < immi);
          4: s.wval = x1v ^ immi;
          6: s.wval = x1v | immi;
          7: s.wval = x1v & immi;
          1: if (f7 == 0) s.wval = x1v << ins[24:20]; else s.illegal = 1;
          5: if (f7 == 0) s.wval = x1v >> ins[24:20];
             else if (f7 == 7'h20) s.wval = 32'(sa >>> ins[24:20]);
             else s.illegal = 1;
        endcase
      end
      7'h03: if (f3 == 2) begin
          s.wr = 1; s.ld = 1; s.addr = x1v + immi;
          s.wval = m_mem[(s.addr >> 2) % DMEM_WORDS];
        end else s.illegal = 1;
      7'h23: if (f3 == 2) begin
          s.st = 1; s.addr = x1v + imms; s.sdata = x2v;
        end else s.illegal = 1;
      7'h63: begin
        logic t;
        case (f3)
          0: t = (x1v == x2v);
          1: t = (x1v != x2v);
          4: t = (sa < sb);
          5: t = (sa >= sb);
          6: t = (x1v < x2v);
          7: t = (x1v >= x2v);
          default: begin t = 0; s.illegal = 1; end
        endcase
        if (t) s.next_pc = m_pc + immb;
      end
      7'h6F: begin s.wr = 1; s.wval = m_pc + 4; s.next_pc = m_pc + immj; end
      7'h67: if (f3 == 0) begin
          s.wr = 1; s.wval = m_pc + 4; s.next_pc = (x1v + immi) & ~32'h1;
        end else s.illegal = 1;
      7'h37: begin s.wr = 1; s.wval = {ins[31:12], 12'b0}; end
      7'h17: begin s.wr = 1; s.wval = m_pc + {ins[31:12], 12'b0}; end
      default: s.illegal = 1;
    endcase
    if (s.illegal) begin s.wr = 0; s.ld = 0; s.st = 0; s.next_pc = m_pc + 4; end
    return s;
  endfunction

  // ---------------- program generator ----------------
  function automatic int rreg();
    // favour a few registers so that operands repeat and compare equal
    return ($urandom_range(0, 3) == 0) ? $urandom_range(0, 31) : $urandom_range(0, 7);
  endfunction

  task automatic gen_program();
    int i = 0;
    foreach (prog[k]) prog[k] = 32'h00000013;
    // seed a few registers
    for (int r = 1; r < 8; r++) begin
      prog[i] = enc_i($urandom_range(0, 4095) - 2048, 0, 0, r, 7'h13); i++;
    end
    while (i < PROG_LEN - 1) begin
      int c = $urandom_range(0, 99);
      int room = PROG_LEN - 1 - i;   // instructions left before the final loop
      if (c < 24) begin
        int f7, f3;
        int kind = $urandom_range(0, 2);
        f3 = $urandom_range(0, 7);
        f7 = (kind == 0) ? 0 : (kind == 1) ? 1 : ((f3 == 0 || f3 == 5) ? 7'h20 : 1);
        prog[i] = enc_r(f7, rreg(), rreg(), f3, rreg());
      end else if (c < 30) begin
        // divide/remainder, sometimes by x0
        prog[i] = enc_r(1, ($urandom_range(0, 2) == 0) ? 0 : rreg(), rreg(),
                        $urandom_range(4, 7), rreg());
      end else if (c < 44) begin
        int f3 = $urandom_range(0, 7);
        if (f3 == 1) prog[i] = {7'h00, 5'($urandom), 5'(rreg()), 3'd1, 5'(rreg()), 7'h13};
        else if (f3 == 5) prog[i] = {($urandom_range(0, 1) ? 7'h20 : 7'h00), 5'($urandom),
                                     5'(rreg()), 3'd5, 5'(rreg()), 7'h13};
        else prog[i] = enc_i($urandom_range(0, 4095), rreg(), f3, rreg(), 7'h13);
      end else if (c < 50) begin
        prog[i] = {20'($urandom), 5'(rreg()), 7'h37};              // lui
      end else if (c < 53) begin
        prog[i] = {20'($urandom), 5'(rreg()), 7'h17};              // auipc
      end else if (c < 62) begin
        prog[i] = enc_s(4 * $urandom_range(0, 40), rreg(), 0);    // sw rs2, off(x0)
      end else if (c < 71) begin
        prog[i] = enc_i(4 * $urandom_range(0, 40), 0, 2, rreg(), 7'h03);  // lw
      end else if (c < 86 && room > 2) begin
        int f3s [6] = '{0, 1, 4, 5, 6, 7};
        int r1 = rreg();
        int r2 = ($urandom_range(0, 2) == 0) ? r1 : rreg();
        int off = 4 * $urandom_range(1, (room < 6) ? room : 6);
        prog[i] = enc_b(off, r2, r1, f3s[$urandom_range(0, 5)]);
      end else if (c < 91 && room > 2) begin
        prog[i] = enc_j(4 * $urandom_range(1, (room < 5) ? room : 5), rreg());
      end else if (c < 96 && room > 2) begin
        int tgt = i + $urandom_range(1, (room < 5) ? room : 5);
        prog[i] = enc_i(4 * tgt, 0, 0, rreg(), 7'h67);              // jalr rd, tgt(x0)
      end else begin
        case ($urandom_range(0, 3))                                 // unsupported
          0: prog[i] = {25'($urandom), 7'h7F};
          1: prog[i] = enc_r(7'h02, rreg(), rreg(), 0, rreg());
          2: prog[i] = enc_i(0, 0, 0, rreg(), 7'h03);                // lb
          default: prog[i] = enc_s(0, rreg(), 0) & ~32'h00007000;    // sb
        endcase
      end
      i++;
    end
    prog[PROG_LEN - 1] = enc_j(0, 0);                                // jump to self
  endtask

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc=%h instr=%h", what, m_pc, prog[(m_pc >> 2) % IMEM_WORDS]);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_mem[k]) m_mem[k] = 0;
    foreach (seen[k]) seen[k] = 0;
    for (int n = 0; n < NPROGS; n++) begin
      int cycles;
      cycles = 0;
      rst = 1;
      gen_program();
      @(negedge clk);
      foreach (prog[k]) dut.u_imem.rom[k] = prog[k];
      foreach (m_reg[k]) m_reg[k] = 0;
      m_pc = 0;
      @(negedge clk);
      rst = 0;
      #1;
      while (!(prog[(m_pc >> 2) % IMEM_WORDS] == enc_j(0, 0)) && cycles < 4 * PROG_LEN) begin
        step_t s;
        logic [31:0] ins;
        ins = prog[(m_pc >> 2) % IMEM_WORDS];
        s = model_step(ins);
        check(pc_address == m_pc, "pc");
        check(instruction == ins, "instruction");
        check(next_pc == s.next_pc, "next_pc");
        check(illegal_instr == s.illegal, "illegal flag");
        check(reg_write == s.wr, "reg_write");
        if (s.wr) check(write_data == s.wval, "write_data");
        check(mem_write == s.st, "mem_write");
        check(mem_read == s.ld, "mem_read");
        if (s.st || s.ld) check(alu_result == s.addr, "mem address");
        if (s.st) check(data_write == s.sdata, "store data");
        // mechanism bookkeeping
        if (ins[6:0] == 7'h63 && !s.illegal) seen[(s.next_pc != m_pc + 4) ? M_BR_TAKEN : M_BR_NOT]++;
        if (ins[6:0] == 7'h6F) seen[M_JAL]++;
        if (ins[6:0] == 7'h67 && !s.illegal) seen[M_JALR]++;
        if (s.ld) seen[M_LOAD]++;
        if (s.st) seen[M_STORE]++;
        if (ins[6:0] == 7'h33 && ins[31:25] == 7'h01 && ins[14] == 1'b0) seen[M_MUL]++;
        if (ins[6:0] == 7'h33 && ins[31:25] == 7'h01 && ins[14] == 1'b1) begin
          seen[M_DIV]++;
          if (m_reg[ins[24:20]] == 0) seen[M_DIV0]++;
        end
        if (s.wr && ins[11:7] == 0) seen[M_X0WRITE]++;
        if (s.illegal) seen[M_ILLEGAL]++;
        if (ins[6:0] == 7'h37) seen[M_LUI]++;
        if (ins[6:0] == 7'h17) seen[M_AUIPC]++;
        if (ins[6:0] == 7'h13 && !s.illegal) seen[M_IMM]++;
        if (!s.illegal && (ins[6:0] == 7'h13 || ins[6:0] == 7'h33) && ins[13:12] == 2'b01 &&
            ins[31:25] != 7'h01) seen[M_SHIFT]++;
        // advance the model
        if (s.wr && ins[11:7] != 0) m_reg[ins[11:7]] = s.wval;
        if (s.st) m_mem[(s.addr >> 2) % DMEM_WORDS] = s.sdata;
        m_pc = s.next_pc;
        cycles++;
        @(negedge clk);
      end
      check(cycles < 4 * PROG_LEN, "program reached its end");
      check(pc_address == 32'(4 * (PROG_LEN - 1)), "final pc");
      for (int r = 0; r < 32; r++) check(dut.u_rf.regs[r] == ((r == 0) ? 32'b0 : m_reg[r]), "final register");
      for (int w = 0; w < DMEM_WORDS; w++) check(dut.u_dmem.mem[w] == m_mem[w], "final memory");
    end
    for (int k = 0; k < M_NUM; k++) begin
      $display("mechanism %-12s seen %0d times", mech_e'(k), seen[k]);
      check(seen[k] > 0, "mechanism exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
