// scale: the SCALE block, multiplies the butterfly sum P+Q by the CORDIC gain K.
//
// The CORDIC rotation of P-Q grows its result by K = 1.64676 (16 iterations); scaling
// P+Q by the same K keeps both butterfly outputs in the same ratio, and it runs while
// the CORDIC iterates, so it costs no time. Implemented as a constant multiplication by
// K_Q14 = round(K * 2^14) followed by a 14-bit arithmetic shift, saturated to W bits.
// Timing: when en is high, d is captured and q shows K*d from the next cycle on.
// The function follows the processor description; the fixed-point form is this design's.
module scale #(
  parameter int unsigned W     = 16,
  parameter int          K_Q14 = fft_pkg::K_Q14
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  localparam logic signed [W+15:0] MAXV = (W+16)'((1 <<< (W-1)) - 1);
  localparam logic signed [W+15:0] MINV = -(W+16)'(1 <<< (W-1));

  logic signed [W+15:0] prod, shifted;

  always_comb begin
    prod    = (W+16)'(d) * (W+16)'(K_Q14);
    shifted = prod >>> 14;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (shifted > MAXV)      q <= MAXV[W-1:0];
      else if (shifted < MINV) q <= MINV[W-1:0];
      else                     q <= shifted[W-1:0];
    end
  end

endmodule
