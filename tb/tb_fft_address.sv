// tb_fft_address: self-checking test of ADDRESS. Steps through all 7 x 64 butterflies
// and checks FI, SE and k against the radix-2 DIF flow graph worked out here
// (span 64>>s, groups of 2*span), that every address is touched exactly once per stage,
// that last is high only on the final butterfly, and that the walk restarts after it.
module tb_fft_address;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [6:0] fi, se;
  logic [5:0] k;
  logic [2:0] stage;
  logic last;
  int checks = 0, failures = 0;

  fft_address dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int s = 0; s < 7; s++) begin
        bit seen [128];
        int span;
        span = 64 >> s;
        for (int a = 0; a < 128; a++) seen[a] = 0;
        for (int g = 0; g < 64 / span; g++) begin
          for (int j = 0; j < span; j++) begin
            @(negedge clk); step = 0; #1;
            checks += 5;
            if (int'(fi) != g * 2 * span + j) begin failures++; $display("FAIL: s%0d fi %0d", s, fi); end
            if (int'(se) != g * 2 * span + j + span) begin failures++; $display("FAIL: s%0d se %0d", s, se); end
            if (int'(k) != j * (1 << s)) begin failures++; $display("FAIL: s%0d k %0d", s, k); end
            if (int'(stage) != s) begin failures++; $display("FAIL: stage"); end
            if (last !== (s == 6 && g == 63 && j == 0)) begin failures++; $display("FAIL: last"); end
            seen[fi] = 1; seen[se] = 1;
            @(negedge clk); step = 1;
          end
        end
        begin
          int cnt;
          cnt = 0;
          for (int a = 0; a < 128; a++) cnt += seen[a];
          checks++; if (cnt != 128) begin failures++; $display("FAIL: stage %0d covers %0d", s, cnt); end
        end
      end
    end
    // clear in the middle of a walk
    @(negedge clk); step = 1; @(negedge clk); step = 0; clear = 1; @(negedge clk); clear = 0; #1;
    checks++; if (fi != 0 || se != 64 || stage != 0) begin failures++; $display("FAIL: clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
