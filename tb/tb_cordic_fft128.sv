// tb_cordic_fft128: end-to-end test of the 128-point CORDIC FFT processor at its default
// parameters.
//
// Frames of 8-bit real samples are fed at one sample every SAMPLE_DIV clocks (the
// real-time rate at which a frame's transform and display fit inside the next frame's
// input time). For every displayed frame the 128 output magnitudes are compared with a
// DFT computed here in floating point, scaled as the processor scales it:
//   expected[b] = |sum_n x[n] exp(-j 2 pi b n / 128)| / 128 * K^8 * 4.
// Frames: two tones, full-range noise, a frame sent at full speed while the previous
// one is still in work (must be dropped with overrun), a full-scale DC frame, and a
// full-scale alternating frame and an all-zero frame. The tolerance (100 LSB plus 1%)
// covers the truncation of the halving butterflies and the CORDIC's residual angle. The test counts how often each mechanism happened
// (bank swaps in both directions, butterfly rotations, vectoring passes, displays,
// overrun) and measures the cycles from a full input frame to the last displayed bin.
module tb_cordic_fft128;

  localparam int N          = 128;
  localparam int SAMPLE_DIV = 90;
  localparam real K         = 1.6467602578654548;
  localparam real PI        = 3.14159265358979;
  localparam int  LATENCY   = 10944;   // frame_full cycle to frame_done cycle

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic signed [7:0] in_data = '0;
  logic              out_valid, frame_done, overrun, ph1, busy;
  logic [6:0]        out_index;
  logic [15:0]       out_data;

  cordic_fft128 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap_up = 0, n_swap_down = 0, n_overrun = 0, n_frames = 0, n_rot = 0, n_vec = 0;
  int n_bins = 0;
  longint cycle = 0;
  longint t_full = -1;

  // expected spectra of accepted frames, in order
  real exp_mem [8][N];
  int  exp_wr = 0, exp_rd = 0;
  real cur [N];
  int  worst_err = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void spectrum(input int x [N], output real m [N]);
    for (int b = 0; b < N; b++) begin
      real re = 0.0, im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += x[n] * $cos(2.0 * PI * b * n / N);
        im -= x[n] * $sin(2.0 * PI * b * n / N);
      end
      m[b] = $sqrt(re * re + im * im) / N * (K ** 8) * 4.0;
    end
  endfunction

  task automatic send_frame(input int x [N], input int div, input bit expect_accept);
    real m [N];
    if (expect_accept) begin
      spectrum(x, m);
      for (int b = 0; b < N; b++) exp_mem[exp_wr % 8][b] = m[b];
      exp_wr++;
    end
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = 8'(x[n]);
      @(negedge clk);
      in_valid = 1'b0;
      repeat (div - 2) @(negedge clk);
    end
  endtask

  // Mechanism monitors.
  logic ph1_q = 1'b0;
  always @(posedge clk) begin
    ph1_q <= ph1;
    if (rst_n) begin
      if (ph1 && !ph1_q) n_swap_up++;
      if (!ph1 && ph1_q) n_swap_down++;
      if (overrun) n_overrun++;
      if (dut.u_cordic.start && !dut.u_cordic.vector) n_rot++;
      if (dut.u_cordic.start &&  dut.u_cordic.vector) n_vec++;
      if (dut.in_wrap && !busy) t_full <= cycle;
    end
  end

  // Output checker.
  int bin_expect = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (bin_expect == 0) begin
        if (exp_rd == exp_wr) begin
          check(1'b0, "display of a frame that was not expected");
          for (int b = 0; b < N; b++) cur[b] = 0.0;
        end else begin
          for (int b = 0; b < N; b++) cur[b] = exp_mem[exp_rd % 8][b];
          exp_rd++;
        end
      end
      begin
        int e, got, tol, err;
        e   = $rtoi(cur[out_index] + 0.5);
        got = int'(out_data);
        tol = 100 + $rtoi(cur[out_index] * 0.01);
        err = (got > e) ? got - e : e - got;
        if (err > worst_err) worst_err = err;
        check(out_index == 7'(bin_expect), $sformatf("bin order: got %0d want %0d", out_index, bin_expect));
        check(err <= tol, $sformatf("frame %0d bin %0d: got %0d want %0d", n_frames, out_index, got, e));
      end
      n_bins++;
      bin_expect = (bin_expect + 1) % N;
      if (frame_done) begin
        n_frames++;
        check(bin_expect == 0, "frame_done on the last bin");
        check(cycle - t_full == LATENCY,
              $sformatf("latency %0d cycles, expected %0d", cycle - t_full, LATENCY));
      end
    end
  end

  initial begin
    #(10 * 400000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [N];
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (140) @(negedge clk);   // RAMY clear

    // 1: two tones
    for (int n = 0; n < N; n++)
      x[n] = $rtoi(60.0 * $cos(2.0 * PI * 5 * n / N) + 40.0 * $sin(2.0 * PI * 23 * n / N + 0.3));
    send_frame(x, SAMPLE_DIV, 1'b1);
    // 2: full-range noise
    for (int n = 0; n < N; n++) x[n] = int'($urandom_range(255)) - 128;
    send_frame(x, SAMPLE_DIV, 1'b1);
    // 3: sent at full speed while frame 2 is being processed: dropped
    for (int n = 0; n < N; n++) x[n] = 100;
    send_frame(x, 2, 1'b0);
    wait (!busy);
    // 4: full-scale DC
    for (int n = 0; n < N; n++) x[n] = 127;
    send_frame(x, SAMPLE_DIV, 1'b1);
    // 5: full-scale alternating
    for (int n = 0; n < N; n++) x[n] = (n % 2) ? -128 : 127;
    send_frame(x, SAMPLE_DIV, 1'b1);
    // 6: all zero
    for (int n = 0; n < N; n++) x[n] = 0;
    send_frame(x, SAMPLE_DIV, 1'b1);
    repeat (LATENCY + 200) @(negedge clk);

    check(exp_wr == exp_rd, $sformatf("%0d frames left undisplayed", exp_wr - exp_rd));
    check(n_frames == 5 && exp_wr == 5, $sformatf("frames displayed %0d", n_frames));
    check(n_swap_up > 0,   "bank swap to PH1 never happened");
    check(n_swap_down > 0, "bank swap to PH2 never happened");
    check(n_overrun > 0,   "overrun never happened");
    check(n_rot == 5 * 448, $sformatf("rotations %0d", n_rot));
    check(n_vec == 5 * 128, $sformatf("vectorings %0d", n_vec));
    $display("frames=%0d bins=%0d swaps=%0d/%0d overruns=%0d rotations=%0d vectorings=%0d worst_err=%0d",
             n_frames, n_bins, n_swap_up, n_swap_down, n_overrun, n_rot, n_vec, worst_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
