// tb_fft_ram: self-checking test of the 128-word RAM. Writes random words to random
// addresses, mirroring them in a reference array, and checks the combinational read of
// every address, including read-after-write in the next cycle and that a cycle with
// we low leaves the memory unchanged.
module tb_fft_ram;
  logic clk = 0, we = 0;
  logic [6:0]  addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [128];
  int checks = 0, failures = 0;

  fft_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); we = 1; addr = 7'(a); wdata = 16'($urandom); ref_mem[a] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      addr = 7'($urandom); wdata = 16'($urandom); we = $urandom_range(1);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++; $display("FAIL: addr %0d got %h want %h", addr, rdata, ref_mem[addr]);
      end
      if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
