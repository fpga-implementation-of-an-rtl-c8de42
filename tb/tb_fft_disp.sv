// tb_fft_disp: self-checking test of DISP: the input counter advances on each sample
// and flags the 128th; the display counter runs independently, dis is the 7-bit
// bit reversal of dis_index, and dis_wrap flags the last bin.
module tb_fft_disp;
  logic clk = 0, rst_n = 0, in_en = 0, dis_clear = 0, dis_en = 0;
  logic [6:0] inp, dis, dis_index;
  logic in_wrap, dis_wrap;
  int checks = 0, failures = 0;
  int mi = 0, md = 0;

  fft_disp dut (.*);
  always #5 clk = ~clk;

  function automatic int rev7(input int v);
    int r = 0;
    for (int i = 0; i < 7; i++) if (v & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      in_en     = $urandom_range(1);
      dis_en    = ($urandom_range(3) != 0);
      dis_clear = ($urandom_range(199) == 0);
      #1;
      checks += 5;
      if (int'(inp) != mi) begin failures++; $display("FAIL: inp"); end
      if (int'(dis_index) != md) begin failures++; $display("FAIL: dis_index"); end
      if (int'(dis) != rev7(md)) begin failures++; $display("FAIL: dis %0d for %0d", dis, md); end
      if (in_wrap !== (in_en && mi == 127)) begin failures++; $display("FAIL: in_wrap"); end
      if (dis_wrap !== (dis_en && md == 127)) begin failures++; $display("FAIL: dis_wrap"); end
      if (in_en) mi = (mi + 1) % 128;
      if (dis_clear) md = 0; else if (dis_en) md = (md + 1) % 128;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
