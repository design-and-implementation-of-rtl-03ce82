// Instruction memory: a word-organised ROM read at the PC.
//
// DEPTH 32-bit words. The byte address from the PC selects word
// addr[$clog2(DEPTH)+1:2]; the two low bits and the bits above the ROM
// size are ignored, so the address space wraps. The read is combinational
// so that fetch, decode, execute and write-back all fit in one clock.
// With INIT_FILE empty (the default) the ROM holds a built-in
// demonstration program (listed below) followed by NOPs (addi x0,x0,0).
// Otherwise it is filled with NOPs and the file (hex, one word per line)
// is loaded over them with $readmemh. The depth
// and the default contents are design choices.
module instruction_memory #(
  parameter int    DEPTH     = 256,
  parameter string INIT_FILE = "",
  localparam int   AW        = $clog2(DEPTH)
) (
  input  logic [31:0] addr,
  output logic [31:0] instr
);

  // Default program (built in, used when INIT_FILE is empty):
  //   addi x0,x0,0 ; addi x1,x0,4 ; addi x2,x0,8 ; add x3,x1,x2 ;
  //   sub x4,x1,x2 ; mulh x4,x1,x2 ; mul x5,x1,x2 ; div x6,x1,x2 ;
  //   rem x7,x1,x2 ; sw x6,0(x5) ; lw x6,0(x1) ; and x5,x1,x2 ;
  //   or x6,x1,x2 ; xor x7,x1,x2 ; sll x6,x1,x2 ; srl x7,x1,x2 ;
  //   sra x8,x1,x2 ; jal x0,0
  localparam int DEMO_LEN = 18;
  localparam logic [31:0] DEMO_PROG [DEMO_LEN] = '{
    32'h00000013, 32'h00400093, 32'h00800113, 32'h002081B3, 32'h40208233, 32'h02209233,
    32'h022082B3, 32'h0220C333, 32'h0220E3B3, 32'h0062A023, 32'h0000A303, 32'h0020F2B3,
    32'h0020E333, 32'h0020C3B3, 32'h00209333, 32'h0020D3B3, 32'h4020D433, 32'h0000006F};

  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      rom[i] = (i < DEMO_LEN && INIT_FILE == "") ? DEMO_PROG[i] : rv32m_pkg::NOP_INSTR;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign instr = rom[addr[AW+1:2]];

endmodule
