// Self-checking testbench for data_memory.
//
// Random word stores and loads over the whole memory, compared with a model
// array: a store lands at the clock edge, a load is visible in the same
// cycle, read_data is 0 while mem_read is low, the two low address bits
// are ignored and addresses beyond the memory wrap around.
module tb_data_memory;
  localparam int DEPTH = 256;
  logic clk = 0;
  logic mem_read, mem_write;
  logic [31:0] addr, write_data, read_data;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_memory #(.DEPTH(DEPTH)) dut (.clk(clk), .mem_read(mem_read), .mem_write(mem_write),
                                    .addr(addr), .write_data(write_data), .read_data(read_data));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    mem_read = 0; mem_write = 0; addr = 0; write_data = 0;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      int unsigned w;
      mem_read = $urandom_range(0, 1);
      mem_write = $urandom_range(0, 1);
      addr = $urandom;
      write_data = $urandom;
      w = (addr / 4) % DEPTH;
      #1;
      checks++;
      if (read_data !== (mem_read ? model[w] : 32'b0)) begin
        failures++;
        $display("FAIL addr=%h rd=%0d read=%h exp=%h", addr, mem_read, read_data, model[w]);
      end
      @(posedge clk);
      if (mem_write) model[w] = write_data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
