// Data memory: DEPTH words of 32 bits, accessed only by loads and stores.
//
// The byte address comes from the ALU; word addr[$clog2(DEPTH)+1:2] is
// accessed, the two low bits and the bits above the memory size are
// ignored (word accesses only, address space wraps). When mem_write is
// high, write_data is stored at the rising clock edge. When mem_read is
// high, the addressed word appears combinationally on read_data, in the
// same cycle; otherwise read_data is 0. Contents start at zero. The depth,
// the combinational read and the zero start are design choices.
module data_memory #(
  parameter int  DEPTH = 256,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [31:0] addr,
  input  logic [31:0] write_data,
  output logic [31:0] read_data
);

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 32'b0;
  end

  always_ff @(posedge clk) begin
    if (mem_write) mem[idx] <= write_data;
  end

  assign read_data = mem_read ? mem[idx] : 32'b0;

endmodule
