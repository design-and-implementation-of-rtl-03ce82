// Self-checking testbench for datapath_mux.
//
// A 2-input and a 3-input 32-bit instance get random data; every select
// value is applied and the output compared with the selected input (zero
// for the unused select value of the 3-input mux).
module tb_datapath_mux;
  logic [31:0] in2 [2];
  logic [31:0] in3 [3];
  logic        sel2;
  logic [1:0]  sel3;
  logic [31:0] out2, out3;
  int checks = 0, failures = 0;

  datapath_mux #(.WIDTH(32), .N(2)) dut2 (.in(in2), .sel(sel2), .out(out2));
  datapath_mux #(.WIDTH(32), .N(3)) dut3 (.in(in3), .sel(sel3), .out(out3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      foreach (in2[i]) in2[i] = $urandom;
      foreach (in3[i]) in3[i] = $urandom;
      for (int s = 0; s < 4; s++) begin
        sel2 = 1'(s); sel3 = 2'(s);
        #1;
        checks++;
        if (out2 !== in2[s % 2] || out3 !== ((s < 3) ? in3[s] : 32'b0)) begin
          failures++;
          $display("FAIL sel=%0d out2=%h out3=%h", s, out2, out3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
