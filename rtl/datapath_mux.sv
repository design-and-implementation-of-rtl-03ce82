// N-input datapath multiplexer.
//
// Routes one of N WIDTH-bit inputs to the output, chosen by a binary
// select. The processor uses it wherever the datapath picks between
// sources: the second ALU operand (register or immediate), the first ALU
// operand (register, PC or zero), the register write-back value (ALU,
// memory or PC+4) and the next PC. Purely combinational. A select value of
// N or above gives zero (a design choice).
module datapath_mux #(
  parameter int WIDTH = 32,
  parameter int N     = 2,
  localparam int SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [WIDTH-1:0] in [N],
  input  logic [SW-1:0]    sel,
  output logic [WIDTH-1:0] out
);

  always_comb begin
    out = '0;
    for (int i = 0; i < N; i++) begin
      if (int'(sel) == i) out = in[i];
    end
  end

endmodule
