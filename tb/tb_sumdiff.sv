// tb_sumdiff: self-checking test of SUMDIFF. P is loaded, then Q is applied and the
// block must give floor((P-Q)/2) with sub=1 and floor((P+Q)/2) with sub=0, including
// the extreme 16-bit values, and must hold P while load_p is low.
module tb_sumdiff;
  logic clk = 0, load_p = 0, sub = 0;
  logic signed [15:0] q = '0, y;
  int checks = 0, failures = 0;

  sumdiff dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int p, input int qq);
    int ed, es;
    ed = (p - qq) >>> 1;
    es = (p + qq) >>> 1;
    @(negedge clk); load_p = 1; q = 16'(p);
    @(negedge clk); load_p = 0; q = 16'(qq); sub = 1; #1;
    checks++; if (int'(y) != ed) begin failures++; $display("FAIL: %0d-%0d got %0d want %0d", p, qq, y, ed); end
    @(negedge clk); sub = 0; #1;
    checks++; if (int'(y) != es) begin failures++; $display("FAIL: %0d+%0d got %0d want %0d", p, qq, y, es); end
  endtask

  initial begin
    one(32767, -32768); one(-32768, 32767); one(32767, 32767); one(-32768, -32768);
    for (int t = 0; t < 300; t++) one($signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
