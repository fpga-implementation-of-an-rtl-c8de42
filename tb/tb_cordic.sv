// tb_cordic: self-checking test of the iterative CORDIC.
// Rotation: random vectors rotated by -2*pi*k/128 for every k in 0..63 are compared with
// K*(x cos t - y sin t, x sin t + y cos t), K = 1.64676, worked out in floating point.
// Vectoring: x_out must be K*sqrt(x^2+y^2) and y_out near zero, for vectors in all four
// quadrants. Every result must arrive exactly 17 cycles after start (done pulse).
module tb_cordic;
  localparam real K  = 1.6467602578654548;
  localparam real PI = 3.14159265358979;
  localparam int  TOL = 10;

  logic clk = 0, rst_n = 0, start = 0, vector = 0;
  logic signed [15:0] x_in = '0, y_in = '0, x_out, y_out;
  logic [5:0] k = '0;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic run(input int x, input int y, input int kk, input bit vec);
    real t, ex, ey;
    int  lat;
    @(negedge clk);
    start = 1; vector = vec; x_in = 16'(x); y_in = 16'(y); k = 6'(kk);
    @(negedge clk);
    start = 0; x_in = 16'($urandom); y_in = 16'($urandom);
    lat = 1;
    while (!done && lat < 40) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 17) begin failures++; $display("FAIL: latency %0d", lat); end
    if (vec) begin
      ex = K * $sqrt(real'(x) * x + real'(y) * y);
      ey = 0.0;
    end else begin
      t  = -2.0 * PI * kk / 128.0;
      ex = K * (x * $cos(t) - y * $sin(t));
      ey = K * (x * $sin(t) + y * $cos(t));
    end
    checks += 2;
    if (iabs(int'(x_out) - $rtoi(ex)) > TOL) begin failures++; $display("FAIL: v%0d k%0d (%0d,%0d) x %0d want %f", vec, kk, x, y, x_out, ex); end
    if (iabs(int'(y_out) - $rtoi(ey)) > TOL) begin failures++; $display("FAIL: v%0d k%0d (%0d,%0d) y %0d want %f", vec, kk, x, y, y_out, ey); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int kk = 0; kk < 64; kk++)
      for (int r = 0; r < 4; r++)
        run($urandom_range(24000) - 12000, $urandom_range(24000) - 12000, kk, 1'b0);
    run(12000, 0, 32, 1'b0);
    run(0, -12000, 63, 1'b0);
    for (int r = 0; r < 200; r++)
      run($urandom_range(24000) - 12000, $urandom_range(24000) - 12000, 0, 1'b1);
    run(-12000, 1, 0, 1'b1);
    run(-12000, -1, 0, 1'b1);
    run(0, 12000, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
