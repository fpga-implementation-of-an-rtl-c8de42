// tb_scale: self-checking test of SCALE. The registered output must equal
// floor(d * 26981 / 2^14), saturated to 16 bits, one cycle after en, and hold while
// en is low. 26981 = round(K * 2^14), K = 1.64676 (16-iteration CORDIC gain).
module tb_scale;
  logic clk = 0, en = 0;
  logic signed [15:0] d = '0, q;
  int checks = 0, failures = 0;

  scale dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_of(input int v);
    longint p;
    p = (longint'(v) * 26981) >>> 14;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return int'(p);
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      int v, e;
      v = (t < 4) ? ((t == 0) ? 32767 : (t == 1) ? -32768 : (t == 2) ? 19898 : -19898)
                  : int'($signed(16'($urandom)));
      e = expect_of(v);
      @(negedge clk); en = 1; d = 16'(v);
      @(negedge clk); en = 0; d = 16'($urandom);
      checks++; if (int'(q) != e) begin failures++; $display("FAIL: %0d got %0d want %0d", v, q, e); end
      @(negedge clk);
      checks++; if (int'(q) != e) begin failures++; $display("FAIL: hold %0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
