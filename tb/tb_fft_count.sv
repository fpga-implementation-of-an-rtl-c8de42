// tb_fft_count: self-checking test of COUNT: counts only when enabled, wraps from 127
// to 0 with wrap high on the last step, and clear returns it to 0.
module tb_fft_count;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [6:0] q;
  logic wrap;
  int checks = 0, failures = 0;
  int model = 0;

  fft_count dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      clear = ($urandom_range(99) == 0);
      en    = ($urandom_range(3) != 0);
      #1;
      checks += 2;
      if (int'(q) != model) begin failures++; $display("FAIL: q %0d want %0d", q, model); end
      if (wrap !== (en && model == 127)) begin failures++; $display("FAIL: wrap"); end
      if (clear) model = 0; else if (en) model = (model + 1) % 128;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
