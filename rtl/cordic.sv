// cordic: iterative shift-add CORDIC, the rotation engine of the FFT butterfly.
//
// Rotation mode (vector=0): rotates (x_in, y_in) by the twiddle angle -2*pi*k/128,
// i.e. multiplies the butterfly difference P-Q by W128^k. Vectoring mode (vector=1):
// rotates (x_in, y_in) onto the positive x axis, so x_out becomes the magnitude; the
// processor uses it to turn the final complex spectrum into a power spectrum.
// Either way the result carries the CORDIC gain K (1.64676 for 16 iterations), which
// is not removed here: SCALE applies the same factor to the other butterfly output.
//
// Angles are binary angles (a full turn is 2^ANG_W). Before iterating, rotations past
// -90 degrees are pre-rotated by -90 degrees, and vectors with negative x by 180
// degrees, so that the residual lies inside the CORDIC convergence range (about 99.9
// degrees). Each clock performs one micro-rotation
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2^-i)
// with d = sign(z) when rotating and d = -sign(y) when vectoring. GUARD extra bits are
// carried inside; outputs saturate to W bits.
//
// Timing: start (one cycle) captures the inputs; ITER clocks of iteration follow, busy
// high during them; done is high for the one cycle after the last iteration, and x_out,
// y_out hold the result from then until the next start. With ITER=16 a result is ready
// 17 cycles after start. The two modes and the shift-add form follow the processor
// description; the iteration count, guard bits, pre-rotation and angle format are this
// design's own.
module cordic
  import fft_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned ITER  = 16,   // at most MAX_ITER
  parameter int unsigned GUARD = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                vector,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic [KW-1:0]       k,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic                busy,
  output logic                done
);

  localparam int unsigned IW = W + GUARD;
  localparam int unsigned CW = $clog2(ITER + 1);
  localparam angle_t QUARTER = angle_t'(1) <<< (ANG_W - 2);
  localparam logic signed [IW-1:0] MAXV = IW'((1 <<< (W-1)) - 1);
  localparam logic signed [IW-1:0] MINV = -IW'(1 <<< (W-1));

  logic signed [IW-1:0] x, y;
  angle_t               z;
  logic                 vmode;
  logic [CW-1:0]        it;

  // Pre-rotation of the captured inputs.
  logic signed [IW-1:0] xi, yi, x0, y0;
  angle_t               theta, z0;

  always_comb begin
    xi    = IW'(x_in);
    yi    = IW'(y_in);
    theta = -(angle_t'(k) <<< (ANG_W - LOGN));   // -2*pi*k/N
    x0    = xi;
    y0    = yi;
    z0    = theta;
    if (vector) begin
      z0 = '0;
      if (xi < 0) begin
        x0 = -xi;
        y0 = -yi;
      end
    end else if (theta < -QUARTER) begin
      x0 = yi;                 // rotate by -90 degrees
      y0 = -xi;
      z0 = theta + QUARTER;
    end
  end

  // One micro-rotation.
  logic                 dpos;
  logic signed [IW-1:0] xs, ys;
  angle_t               a;
  always_comb begin
    a    = ATAN[it[$clog2(MAX_ITER)-1:0]];
    dpos = vmode ? (y < 0) : (z >= 0);
    xs   = x >>> it;
    ys   = y >>> it;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      it    <= '0;
      vmode <= 1'b0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x     <= x0;
        y     <= y0;
        z     <= z0;
        vmode <= vector;
        it    <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (dpos) begin
          x <= x - ys;
          y <= y + xs;
          z <= z - a;
        end else begin
          x <= x + ys;
          y <= y - xs;
          z <= z + a;
        end
        if (it == CW'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        it <= it + 1'b1;
      end
    end
  end

  function automatic logic signed [W-1:0] sat(input logic signed [IW-1:0] v);
    if (v > MAXV)      return MAXV[W-1:0];
    else if (v < MINV) return MINV[W-1:0];
    else               return v[W-1:0];
  endfunction

  assign x_out = sat(x);
  assign y_out = sat(y);

  initial assert (ITER >= 1 && ITER <= MAX_ITER) else $fatal(1, "cordic: ITER out of range");

endmodule
