// Self-checking testbench for instruction_memory.
//
// Reads every word of a ROM with its default contents and compares it with
// the expected built-in program (listed below) and NOPs after it, and checks
// that the low address bits are ignored and that addresses beyond the ROM
// wrap around. A second, smaller ROM is loaded from tb/imem_test.hex, whose
// words follow w(i) = (i * 2654435761 + 12345) mod 2^32 for i = 0..15, with
// NOPs after them.
module tb_instruction_memory;
  localparam int DEPTH = 256;
  logic [31:0] addr, instr;
  int checks = 0, failures = 0;

  instruction_memory dut (.addr(addr), .instr(instr));

  logic [31:0] addr_f, instr_f;
  instruction_memory #(.DEPTH(32), .INIT_FILE("tb/imem_test.hex")) dut_file (
    .addr(addr_f), .instr(instr_f));

  localparam logic [31:0] PROG [18] = '{
    32'h00000013, 32'h00400093, 32'h00800113, 32'h002081B3, 32'h40208233, 32'h02209233,
    32'h022082B3, 32'h0220C333, 32'h0220E3B3, 32'h0062A023, 32'h0000A303, 32'h0020F2B3,
    32'h0020E333, 32'h0020C3B3, 32'h00209333, 32'h0020D3B3, 32'h4020D433, 32'h0000006F};

  function automatic logic [31:0] expected(int w);
    return (w < 18) ? PROG[w] : 32'h00000013;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int w = 0; w < DEPTH; w++) begin
      addr = 32'(w * 4) + 32'($urandom_range(0, 3));
      #1;
      checks++;
      if (instr !== expected(w)) begin
        failures++;
        $display("FAIL word %0d instr=%h exp=%h", w, instr, expected(w));
      end
    end
    for (int n = 0; n < 200; n++) begin
      addr = $urandom;
      #1;
      checks++;
      if (instr !== expected(int'((addr >> 2) % DEPTH))) begin
        failures++;
        $display("FAIL addr=%h instr=%h", addr, instr);
      end
    end
    for (int w = 0; w < 32; w++) begin
      logic [31:0] exp;
      exp = (w < 16) ? 32'((longint'(w) * 64'd2654435761 + 64'd12345) & 64'hFFFF_FFFF)
                     : 32'h00000013;
      addr_f = 32'(w * 4);
      #1;
      checks++;
      if (instr_f !== exp) begin
        failures++;
        $display("FAIL file word %0d instr=%h exp=%h", w, instr_f, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
