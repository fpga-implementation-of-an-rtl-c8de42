// fft_address: the ADDRESS block, walks the signal flow graph of the 128-point
// radix-2 decimation-in-frequency FFT one butterfly at a time.
//
// For stage s (0..6) and butterfly b (0..63) of that stage, with span = 64 >> s:
//   FI = (b / span) * 2 * span + (b % span)   address of P (upper input)
//   SE = FI + span                            address of Q (lower input)
//   k  = (b % span) << s                      twiddle index, angle -2*pi*k/128
// Both butterfly outputs go back to the same two addresses (in place), so the result
// ends in bit-reversed order. step moves to the next butterfly, clear returns to the
// first; last is high on the final butterfly of the final stage. Outputs depend only
// on the registered stage and butterfly counters. That the block gives FI, SE and the
// angle follows the processor description; the ordering is the standard in-place one.
module fft_address #(
  parameter int unsigned LOGN = 7,
  localparam int unsigned AW = LOGN,
  localparam int unsigned BW = LOGN - 1,
  localparam int unsigned SW = $clog2(LOGN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  output logic [AW-1:0] fi,
  output logic [AW-1:0] se,
  output logic [BW-1:0] k,
  output logic [SW-1:0] stage,
  output logic          last
);

  logic [BW-1:0] b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      b     <= '0;
    end else if (clear) begin
      stage <= '0;
      b     <= '0;
    end else if (step) begin
      b <= b + 1'b1;
      if (b == '1) stage <= (stage == SW'(LOGN - 1)) ? '0 : stage + 1'b1;
    end
  end

  logic [BW-1:0] low_mask;   // span - 1
  logic [AW-1:0] span;
  logic [BW-1:0] j, grp;
  always_comb begin
    low_mask = {BW{1'b1}} >> stage;
    span     = AW'(low_mask) + 1'b1;
    j        = b & low_mask;
    grp      = b & ~low_mask;    // (b / span) * span
    fi       = (AW'(grp) << 1) | AW'(j);
    se       = fi + span;
    k        = j << stage;
    last     = (stage == SW'(LOGN - 1)) && (b == '1);
  end

endmodule
