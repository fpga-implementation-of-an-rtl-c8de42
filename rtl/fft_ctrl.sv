// fft_ctrl: the controller of the FFT processor.
//
// It owns the bank phase and sequences one frame through four passes:
//  * RAMY clear (once after reset): COUNT sweeps RAMY and writes zeros.
//  * Butterflies: 7 stages x 64 butterflies, each in 19 cycles:
//      P   select FI; SUMDIFF captures P (X and Y)
//      Q   select SE; SUMDIFF gives P-Q; TROT routes it to the CORDIC, which starts
//          rotating by the twiddle angle of k
//      SUM select SE; SUMDIFF gives P+Q, captured by SCALE
//      WP  select FI; K*(P+Q)/2 from SCALE written back over P
//      WQ  select SE; wait for the CORDIC, then write its result over Q and step
//          ADDRESS (the CORDIC needs 17 cycles after its start)
//  * Vectoring: for every address of COUNT, TVEC routes X and Y straight from the RAMs
//    into the CORDIC in vectoring mode (VECTOR=1); its x result, the magnitude times K,
//    is written back to X and a zero to RAMY, ready for the next frame. 18 cycles each.
//  * Display: DISP's DIS address reads the finished bank, one bin per cycle (out_valid).
// ph1 = 1 (PH1 high, PH2 low) sends external input into RAMXII while the passes above
// work on RAMXI; ph1 = 0 the other way round. The phase toggles when the input bank is
// full (frame_full) and the passes of the previous frame are over; a frame that fills
// while they are still running is dropped and flagged on overrun.
// Outputs: the 3-bit address selects SX1, SX2, SY (fft_pkg::addr_sel_e), the bus
// enables TROT, TVEC and the RAM write-source enables, VECTOR and the block strobes.
// The signal names and their roles follow the processor description; the cycle-level
// schedule and the overrun rule are this design's own.
module fft_ctrl
  import fft_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      frame_full,    // last sample of the input frame being written
  input  logic      cordic_done,
  input  logic      addr_last,     // last butterfly of the last stage
  input  logic      count_wrap,
  input  logic      dis_wrap,
  output logic      ph1,
  output addr_sel_e sx1,
  output addr_sel_e sx2,
  output addr_sel_e sy,
  output logic      trot,          // CORDIC input from SUMDIFF
  output logic      tvec,          // CORDIC input from the RAMs
  output logic      vector,        // CORDIC vectoring mode
  output logic      cordic_start,
  output logic      sd_load,       // SUMDIFF captures P
  output logic      sd_sub,        // SUMDIFF gives P-Q (else P+Q)
  output logic      scale_en,
  output logic      wx_scale,      // write compute X bank from SCALE
  output logic      wx_cordic,     // write compute X bank from CORDIC
  output logic      wy_scale,      // write RAMY from SCALE
  output logic      wy_cordic,     // write RAMY from CORDIC
  output logic      wy_zero,       // write zero into RAMY
  output logic      addr_clear,
  output logic      addr_step,
  output logic      count_clear,
  output logic      count_en,
  output logic      dis_clear,
  output logic      dis_en,
  output logic      out_valid,
  output logic      frame_done,
  output logic      overrun,
  output logic      busy
);

  typedef enum logic [3:0] {
    S_CLR, S_IDLE, S_P, S_Q, S_SUM, S_WP, S_WQ, S_VS, S_VW, S_DISP
  } state_e;

  state_e    state, nxt;
  logic      ph1_nxt;
  addr_sel_e csel;   // address for the bank being computed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLR;
      ph1   <= 1'b0;
    end else begin
      state <= nxt;
      ph1   <= ph1_nxt;
    end
  end

  always_comb begin
    nxt          = state;
    ph1_nxt      = ph1;
    csel         = SEL_FI;
    sy           = SEL_FI;
    trot         = 1'b0;
    tvec         = 1'b0;
    vector       = 1'b0;
    cordic_start = 1'b0;
    sd_load      = 1'b0;
    sd_sub       = 1'b0;
    scale_en     = 1'b0;
    wx_scale     = 1'b0;
    wx_cordic    = 1'b0;
    wy_scale     = 1'b0;
    wy_cordic    = 1'b0;
    wy_zero      = 1'b0;
    addr_clear   = 1'b0;
    addr_step    = 1'b0;
    count_clear  = 1'b0;
    count_en     = 1'b0;
    dis_clear    = 1'b0;
    dis_en       = 1'b0;
    out_valid    = 1'b0;
    frame_done   = 1'b0;
    overrun      = 1'b0;

    unique case (state)
      S_CLR: begin
        sy       = SEL_COUNT;
        wy_zero  = 1'b1;
        count_en = 1'b1;
        if (count_wrap) nxt = S_IDLE;
      end
      S_IDLE: begin
        if (frame_full) begin
          ph1_nxt     = ~ph1;
          addr_clear  = 1'b1;
          count_clear = 1'b1;
          nxt         = S_P;
        end
      end
      S_P: begin
        csel    = SEL_FI;
        sy      = SEL_FI;
        sd_load = 1'b1;
        nxt     = S_Q;
      end
      S_Q: begin
        csel         = SEL_SE;
        sy           = SEL_SE;
        sd_sub       = 1'b1;
        trot         = 1'b1;
        cordic_start = 1'b1;
        nxt          = S_SUM;
      end
      S_SUM: begin
        csel     = SEL_SE;
        sy       = SEL_SE;
        scale_en = 1'b1;
        nxt      = S_WP;
      end
      S_WP: begin
        csel     = SEL_FI;
        sy       = SEL_FI;
        wx_scale = 1'b1;
        wy_scale = 1'b1;
        nxt      = S_WQ;
      end
      S_WQ: begin
        csel = SEL_SE;
        sy   = SEL_SE;
        if (cordic_done) begin
          wx_cordic = 1'b1;
          wy_cordic = 1'b1;
          addr_step = 1'b1;
          nxt       = addr_last ? S_VS : S_P;
        end
      end
      S_VS: begin
        csel         = SEL_COUNT;
        sy           = SEL_COUNT;
        tvec         = 1'b1;
        vector       = 1'b1;
        cordic_start = 1'b1;
        nxt          = S_VW;
      end
      S_VW: begin
        csel = SEL_COUNT;
        sy   = SEL_COUNT;
        if (cordic_done) begin
          wx_cordic = 1'b1;
          wy_zero   = 1'b1;
          count_en  = 1'b1;
          if (count_wrap) begin
            dis_clear = 1'b1;
            nxt       = S_DISP;
          end else begin
            nxt = S_VS;
          end
        end
      end
      S_DISP: begin
        csel      = SEL_DIS;
        sy        = SEL_COUNT;
        out_valid = 1'b1;
        dis_en    = 1'b1;
        if (dis_wrap) begin
          frame_done = 1'b1;
          nxt        = S_IDLE;
        end
      end
      default: nxt = S_IDLE;
    endcase

    if (frame_full && state != S_IDLE) overrun = 1'b1;

    // The bank being computed takes csel; the other bank takes the input address.
    sx1 = ph1 ? csel : SEL_INP;
    sx2 = ph1 ? SEL_INP : csel;
  end

  assign busy = (state != S_IDLE);

  // The compute X bank takes at most one write source per cycle.
  property p_wx_one_source;
    @(posedge clk) disable iff (!rst_n) !(wx_scale && wx_cordic);
  endproperty
  assert property (p_wx_one_source);

endmodule
