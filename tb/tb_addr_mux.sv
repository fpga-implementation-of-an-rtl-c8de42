// tb_addr_mux: self-checking test of the RAM address multiplexer, in its five-input
// (RAMXI/RAMXII) and four-input (RAMY) forms. Every select code, including the unused
// codes that must give address 0, is tried with random candidate addresses.
module tb_addr_mux;
  import fft_pkg::*;
  logic [2:0] sel;
  logic [6:0] d5 [5];
  logic [6:0] d4 [4];
  logic [6:0] o5, o4;
  int checks = 0, failures = 0;

  addr_mux #(.NIN(5), .AW(7)) dut5 (.sel, .din(d5), .dout(o5));
  addr_mux #(.NIN(4), .AW(7)) dut4 (.sel, .din(d4), .dout(o4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 5; i++) d5[i] = 7'($urandom);
      for (int i = 0; i < 4; i++) d4[i] = 7'($urandom);
      sel = 3'(t % 8);
      #1;
      checks += 2;
      if (o5 !== ((sel < 5) ? d5[sel] : 7'd0)) begin failures++; $display("FAIL: mux5 sel %0d", sel); end
      if (o4 !== ((sel < 4) ? d4[sel] : 7'd0)) begin failures++; $display("FAIL: mux4 sel %0d", sel); end
    end
    // the named codes
    sel = SEL_DIS; #1; checks++; if (o5 !== d5[4]) failures++;
    sel = SEL_COUNT; #1; checks++; if (o4 !== d4[2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
