// fft_count: the COUNT block, a 7-bit binary up counter.
//
// Gives the RAM addresses for the vectoring pass, which turns each complex output into
// its magnitude, and (this design's use) for clearing RAMY after reset. clear sets the
// count to 0, en advances it by one at the clock edge, and wrap is high while the count
// is at its last value and en is high. Width follows the processor description.
module fft_count #(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  output logic [AW-1:0] q,
  output logic          wrap
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (en)    q <= q + 1'b1;
  end

  assign wrap = en && (q == '1);

endmodule
