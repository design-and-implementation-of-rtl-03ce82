// Program counter.
//
// A 32-bit register that takes the next PC on every rising clock edge, so
// that one instruction completes per cycle. The next value (PC+4, a branch
// or jump target) is computed by next_pc_logic. A synchronous, active-high
// reset loads RESET_PC (0 by default); the reset style is a design choice.
module program_counter #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] next_pc,
  output logic [31:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= next_pc;
  end

endmodule
