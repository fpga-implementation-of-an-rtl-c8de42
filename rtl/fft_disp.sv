// fft_disp: the DISP block, address generator for external input and display output.
//
// inp counts the external samples: each in_en writes one sample at inp and advances it;
// in_wrap marks the sample that fills the 128-word frame. The display counter runs over
// the finished spectrum: dis_index is the frequency bin being shown and dis is its RAM
// address. A decimation-in-frequency FFT leaves bin b at address bitreverse(b), so dis
// is the bit-reversed display count and the spectrum leaves in natural order.
// dis_clear restarts the display, dis_en advances it, dis_wrap marks the last bin.
// The two 7-bit up counters follow the processor description (INP and DIS); keeping
// them separate, so that input and display can run at the same time on the two banks,
// and the bit reversal are this design's choices.
module fft_disp #(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_en,
  input  logic          dis_clear,
  input  logic          dis_en,
  output logic [AW-1:0] inp,
  output logic [AW-1:0] dis,
  output logic [AW-1:0] dis_index,
  output logic          in_wrap,
  output logic          dis_wrap
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inp       <= '0;
      dis_index <= '0;
    end else begin
      if (in_en) inp <= inp + 1'b1;
      if (dis_clear)   dis_index <= '0;
      else if (dis_en) dis_index <= dis_index + 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < AW; i++) dis[i] = dis_index[AW-1-i];
  end

  assign in_wrap  = in_en && (inp == '1);
  assign dis_wrap = dis_en && (dis_index == '1);

endmodule
