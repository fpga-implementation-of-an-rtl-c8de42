// tb_fft_ctrl: self-checking test of the controller with behavioural stand-ins for the
// blocks it sequences (a CORDIC that answers 17 cycles after start, ADDRESS, COUNT and
// DISP counters). Checks: the RAMY clear after reset (128 zero writes through COUNT),
// the bank phase toggling on each accepted frame with the input bank always on INP,
// the 19-cycle butterfly pattern (P on FI, Q on SE with TROT and start, SUM, write P on
// FI, write Q on SE), 448 butterflies, 128 vectorings with TVEC and VECTOR, 128 display
// cycles on DIS, 10944 cycles from frame_full to frame_done, and overrun on a frame that
// completes while busy.
module tb_fft_ctrl;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, frame_full = 0;
  logic cordic_done, addr_last, count_wrap, dis_wrap;
  logic ph1, trot, tvec, vector, cordic_start, sd_load, sd_sub, scale_en;
  logic wx_scale, wx_cordic, wy_scale, wy_cordic, wy_zero;
  logic addr_clear, addr_step, count_clear, count_en, dis_clear, dis_en;
  logic out_valid, frame_done, overrun, busy;
  addr_sel_e sx1, sx2, sy;
  int checks = 0, failures = 0;

  fft_ctrl dut (.*);
  always #5 clk = ~clk;

  // stand-ins
  int cd = 0, nstep = 0, ncount = 0, ndis = 0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cd <= 0; nstep <= 0; ncount <= 0; ndis <= 0;
    end else begin
    if (cordic_start) cd <= 17; else if (cd > 0) cd <= cd - 1;
    if (addr_clear) nstep <= 0; else if (addr_step) nstep <= (nstep + 1) % 448;
    if (count_clear) ncount <= 0; else if (count_en) ncount <= (ncount + 1) % 128;
    if (dis_clear) ndis <= 0; else if (dis_en) ndis <= (ndis + 1) % 128;
    end
  end
  assign cordic_done = (cd == 1);
  assign addr_last   = (nstep == 447);
  assign count_wrap  = count_en && ncount == 127;
  assign dis_wrap    = dis_en && ndis == 127;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitors
  int n_clr = 0, n_bf = 0, n_vec = 0, n_disp = 0, n_over = 0;
  longint cyc = 0, t_full = 0;
  int bf_phase = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      addr_sel_e c, i;
      c = ph1 ? sx1 : sx2;
      i = ph1 ? sx2 : sx1;
      chk(i == SEL_INP, "input bank not on INP");
      if (wy_zero && !wx_cordic) n_clr++;
      if (overrun) n_over++;
      if (sd_load) begin
        chk(c == SEL_FI && sy == SEL_FI, "P read not on FI");
        bf_phase = 0;
      end else if (bf_phase >= 0) bf_phase++;
      case (bf_phase)
        1: chk(c == SEL_SE && trot && cordic_start && sd_sub && !tvec, "Q cycle");
        2: chk(c == SEL_SE && scale_en && !sd_sub, "SUM cycle");
        3: chk(c == SEL_FI && wx_scale && wy_scale, "write P cycle");
        18: begin
          chk(c == SEL_SE && wx_cordic && wy_cordic && addr_step, "write Q cycle");
          n_bf++;
          bf_phase = -1;
        end
        default: if (bf_phase > 3) chk(!wx_cordic && !wx_scale, "stray write");
      endcase
      if (tvec) begin
        chk(vector && cordic_start && c == SEL_COUNT && !trot, "vectoring start");
        n_vec++;
      end
      if (out_valid) begin
        chk(c == SEL_DIS, "display address");
        n_disp++;
      end
      if (frame_done) chk(cyc - t_full == 10944, $sformatf("frame latency %0d", cyc - t_full));
    end
  end

  initial begin
    #(10 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_full();
    @(negedge clk); frame_full = 1; if (!busy) t_full = cyc;
    @(negedge clk); frame_full = 0;
  endtask

  initial begin
    logic p0;
    #12 rst_n = 1;
    repeat (130) @(negedge clk);
    chk(n_clr == 128, $sformatf("RAMY clear wrote %0d", n_clr));
    chk(!busy, "idle after clear");
    for (int f = 0; f < 3; f++) begin
      p0 = ph1;
      pulse_full();
      chk(ph1 == !p0, "phase toggles");
      repeat (50) @(negedge clk);
      if (f == 1) begin
        pulse_full();     // completes while busy
        chk(ph1 == !p0, "no toggle on overrun");
      end
      wait (frame_done);
      @(negedge clk);
      @(negedge clk);
      chk(!busy, "idle after frame");
    end
    chk(n_over == 1, $sformatf("overruns %0d", n_over));
    chk(n_bf == 3 * 448, $sformatf("butterflies %0d", n_bf));
    chk(n_vec == 3 * 128, $sformatf("vectorings %0d", n_vec));
    chk(n_disp == 3 * 128, $sformatf("display cycles %0d", n_disp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
