// Register file: NREGS general-purpose registers of XLEN bits.
//
// Two read ports (rs1 -> rd1, rs2 -> rd2) are combinational; the write port
// (rd, wd, we) writes on the rising clock edge, so a value written in one
// instruction is read by the next. Register x0 always reads zero and
// ignores writes. A synchronous, active-high reset clears every register
// (a design choice).
module register_file #(
  parameter int NREGS = 32,
  parameter int XLEN  = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AW-1:0]   rs1,
  input  logic [AW-1:0]   rs2,
  input  logic [AW-1:0]   rd,
  input  logic            we,
  input  logic [XLEN-1:0] wd,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rd != '0) begin
      regs[rd] <= wd;
    end
  end

  assign rd1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == '0) ? '0 : regs[rs2];

endmodule
