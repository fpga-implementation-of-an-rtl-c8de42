// tb_tri_bus: self-checking test of the shared bus. With no driver enabled the bus
// reads 0 and active is low; with exactly one enabled it carries that driver's data.
module tb_tri_bus;
  logic [2:0]  en;
  logic [15:0] d [3];
  logic [15:0] bus;
  logic        active;
  int checks = 0, failures = 0;

  tri_bus #(.N(3), .W(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int s;
      for (int i = 0; i < 3; i++) d[i] = 16'($urandom);
      s  = $urandom_range(3);
      en = (s == 3) ? 3'b000 : 3'(1 << s);
      #1;
      checks += 2;
      if (bus !== ((s == 3) ? 16'd0 : d[s])) begin failures++; $display("FAIL: bus s=%0d", s); end
      if (active !== (s != 3)) begin failures++; $display("FAIL: active s=%0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
