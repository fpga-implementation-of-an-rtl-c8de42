// cordic_fft128: real-time 128-point FFT processor built around a CORDIC butterfly.
//
// Real samples arrive on in_data (one per in_valid) and are written into one of two
// 128-word RAMs, RAMXI or RAMXII, while the other holds the previous frame and is being
// transformed in place. The transform is a radix-2 decimation-in-frequency FFT: ADDRESS
// walks the flow graph and gives, for each butterfly, the addresses FI (P) and SE (Q)
// and the twiddle index k. Two SUMDIFF blocks (real X, imaginary Y) hold P and form
// (P-Q)/2, which the CORDIC rotates by -2*pi*k/128, and (P+Q)/2, which SCALE multiplies
// by the CORDIC gain K so that both outputs carry the same factor. Results go back over
// P and Q. Imaginary parts live in the single RAMY, needed only during the transform.
// After the last stage a vectoring pass (COUNT addresses, CORDIC in vectoring mode)
// replaces every complex bin by its magnitude and zeroes RAMY again; then DISP reads the
// 128 magnitudes out in natural frequency order.
//
// Output scaling: out_data for bin b is |X[b]| / 128 * K^8 * 2^IN_SHIFT (in units of the
// input LSB), K = 1.64676, X the DFT of the frame; bins leave with out_valid high, one per
// cycle, with their index on out_index. frame_done pulses with the last bin.
// Timing per frame: 448 butterflies x 19 cycles + 128 x 18 vectoring cycles + 128
// display cycles = 10944 clocks from the cycle in which the input frame fills to the
// cycle of its last displayed bin; frames must therefore arrive no faster than one
// sample every 86 clocks, or they are dropped (overrun pulses when a frame completes while
// the previous one is still being processed); busy is high while a frame is in
// work. After reset, 128 cycles clear RAMY.
// The block structure, the ping-pong RAMs, the SUMDIFF/CORDIC/SCALE butterfly and the
// vectoring step follow the processor description; the word growth control (halving in
// SUMDIFF, IN_SHIFT), the cycle schedule and the overrun rule are this design's own.
module cordic_fft128
  import fft_pkg::*;
#(
  parameter int unsigned IN_W     = 8,
  parameter int unsigned IN_SHIFT = 2,
  parameter int unsigned ITER     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                 out_valid,
  output logic [AW-1:0]        out_index,
  output logic [DW-1:0]        out_data,
  output logic                 frame_done,
  output logic                 overrun,
  output logic                 ph1,
  output logic                 busy
);

  // ---------------- control ----------------
  addr_sel_e sx1, sx2, sy;
  logic trot, tvec, vector, cordic_start, sd_load, sd_sub, scale_en;
  logic wx_scale, wx_cordic, wy_scale, wy_cordic, wy_zero;
  logic addr_clear, addr_step, count_clear, count_en, dis_clear, dis_en;
  logic cordic_done, addr_last, count_wrap, dis_wrap, in_wrap;

  // ---------------- address generators ----------------
  logic [AW-1:0] fi, se, cnt, inp, dis;
  logic [KW-1:0] k;

  fft_address #(.LOGN(LOGN)) u_address (
    .clk, .rst_n, .clear(addr_clear), .step(addr_step),
    .fi, .se, .k, .stage(), .last(addr_last)
  );

  fft_count #(.AW(AW)) u_count (
    .clk, .rst_n, .clear(count_clear), .en(count_en), .q(cnt), .wrap(count_wrap)
  );

  fft_disp #(.AW(AW)) u_disp (
    .clk, .rst_n, .in_en(in_valid), .dis_clear, .dis_en,
    .inp, .dis, .dis_index(out_index), .in_wrap, .dis_wrap
  );

  fft_ctrl u_ctrl (
    .clk, .rst_n, .frame_full(in_wrap), .cordic_done, .addr_last, .count_wrap, .dis_wrap,
    .ph1, .sx1, .sx2, .sy, .trot, .tvec, .vector, .cordic_start, .sd_load, .sd_sub,
    .scale_en, .wx_scale, .wx_cordic, .wy_scale, .wy_cordic, .wy_zero,
    .addr_clear, .addr_step, .count_clear, .count_en, .dis_clear, .dis_en,
    .out_valid, .frame_done, .overrun, .busy
  );

  // ---------------- address multiplexers ----------------
  logic [AW-1:0] ax_cand [5];
  logic [AW-1:0] ay_cand [4];
  logic [AW-1:0] a_x1, a_x2, a_y;

  assign ax_cand = '{fi, se, cnt, inp, dis};
  assign ay_cand = '{fi, se, cnt, inp};

  addr_mux #(.NIN(5), .AW(AW)) u_mux_x1 (.sel(sx1), .din(ax_cand), .dout(a_x1));
  addr_mux #(.NIN(5), .AW(AW)) u_mux_x2 (.sel(sx2), .din(ax_cand), .dout(a_x2));
  addr_mux #(.NIN(4), .AW(AW)) u_mux_y  (.sel(sy),  .din(ay_cand), .dout(a_y));

  // ---------------- datapath ----------------
  logic signed [DW-1:0] rd_x1, rd_x2, rd_y, rd_x;      // RAM read data
  logic signed [DW-1:0] sd_x, sd_y;                    // SUMDIFF outputs
  logic signed [DW-1:0] sc_x, sc_y;                    // SCALE outputs
  logic signed [DW-1:0] co_x, co_y;                    // CORDIC outputs
  logic signed [DW-1:0] ext;                           // scaled external sample

  assign ext  = DW'(in_data) <<< IN_SHIFT;
  assign rd_x = ph1 ? rd_x1 : rd_x2;                   // bank being computed

  sumdiff #(.W(DW)) u_sumdiff_x (.clk, .load_p(sd_load), .sub(sd_sub), .q(rd_x), .y(sd_x));
  sumdiff #(.W(DW)) u_sumdiff_y (.clk, .load_p(sd_load), .sub(sd_sub), .q(rd_y), .y(sd_y));

  // SCALE applies the gain of a CORDIC with ITER iterations.
  localparam int KQ = K_Q14_TAB[ITER-1];
  scale #(.W(DW), .K_Q14(KQ)) u_scale_x (.clk, .en(scale_en), .d(sd_x), .q(sc_x));
  scale #(.W(DW), .K_Q14(KQ)) u_scale_y (.clk, .en(scale_en), .d(sd_y), .q(sc_y));

  // CORDIC input buses: TROT from SUMDIFF, TVEC straight from the RAMs.
  logic [DW-1:0] cx_src [2];
  logic [DW-1:0] cy_src [2];
  logic [DW-1:0] cx_bus, cy_bus;
  assign cx_src = '{sd_x, rd_x};
  assign cy_src = '{sd_y, rd_y};
  tri_bus #(.N(2), .W(DW)) u_bus_cx (.en({tvec, trot}), .d(cx_src), .bus(cx_bus), .active());
  tri_bus #(.N(2), .W(DW)) u_bus_cy (.en({tvec, trot}), .d(cy_src), .bus(cy_bus), .active());

  cordic #(.W(DW), .ITER(ITER)) u_cordic (
    .clk, .rst_n, .start(cordic_start), .vector,
    .x_in(cx_bus), .y_in(cy_bus), .k,
    .x_out(co_x), .y_out(co_y), .busy(), .done(cordic_done)
  );

  // RAM write buses: external input, SCALE, CORDIC (and zero for RAMY).
  logic          in_x1, in_x2;
  logic [2:0]    en_x1, en_x2, en_y;
  logic [DW-1:0] wx_src [3];
  logic [DW-1:0] wy_src [3];
  logic [DW-1:0] wd_x1, wd_x2, wd_y;
  logic          we_x1, we_x2, we_y;

  assign in_x1  = in_valid && !ph1;                    // PH2: input into RAMXI
  assign in_x2  = in_valid &&  ph1;                    // PH1: input into RAMXII
  assign wx_src = '{ext, sc_x, co_x};
  assign wy_src = '{sc_y, co_y, '0};
  assign en_x1  = {wx_cordic &&  ph1, wx_scale &&  ph1, in_x1};
  assign en_x2  = {wx_cordic && !ph1, wx_scale && !ph1, in_x2};
  assign en_y   = {wy_zero, wy_cordic, wy_scale};

  tri_bus #(.N(3), .W(DW)) u_bus_x1 (.en(en_x1), .d(wx_src), .bus(wd_x1), .active(we_x1));
  tri_bus #(.N(3), .W(DW)) u_bus_x2 (.en(en_x2), .d(wx_src), .bus(wd_x2), .active(we_x2));
  tri_bus #(.N(3), .W(DW)) u_bus_y  (.en(en_y),  .d(wy_src), .bus(wd_y),  .active(we_y));

  fft_ram #(.DEPTH(N), .DATA_W(DW)) u_ramx1 (.clk, .we(we_x1), .addr(a_x1), .wdata(wd_x1), .rdata(rd_x1));
  fft_ram #(.DEPTH(N), .DATA_W(DW)) u_ramx2 (.clk, .we(we_x2), .addr(a_x2), .wdata(wd_x2), .rdata(rd_x2));
  fft_ram #(.DEPTH(N), .DATA_W(DW)) u_ramy  (.clk, .we(we_y),  .addr(a_y),  .wdata(wd_y),  .rdata(rd_y));

  assign out_data = rd_x;

endmodule
