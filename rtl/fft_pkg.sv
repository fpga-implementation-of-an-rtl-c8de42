// fft_pkg: constants shared by the blocks of the 128-point CORDIC FFT processor.
//
// Holds the transform size, the address-multiplexer select codes, the binary-angle
// format used by the CORDIC and the CORDIC constants. The arctangent table is
//   ATAN[i] = round(atan(2^-i) / (2*pi) * 2^ANG_W),  ANG_W = 20 (a full turn is 2^20),
// and the CORDIC gain after n micro-rotations is
//   K(n) = prod_{i=0..n-1} sqrt(1 + 2^-2i)   (K(16) = 1.6467602...),
// stored as round(K(n) * 2^14) for n = 1..16.
// The transform size (128 points, radix 2, decimation in frequency) and the 16-bit
// data word follow the processor description; the angle format, the select codes and
// the iteration count are this design's own choices.
package fft_pkg;

  localparam int unsigned N     = 128;
  localparam int unsigned LOGN  = 7;
  localparam int unsigned AW    = 7;     // RAM address width
  localparam int unsigned DW    = 16;    // data word width
  localparam int unsigned KW    = 6;     // twiddle index width (0..N/2-1)
  localparam int unsigned ANG_W = 20;    // binary angle width, full turn = 2^ANG_W
  localparam int unsigned MAX_ITER = 16; // entries in the arctangent table

  // Address multiplexer select codes (SX1, SX2, SY are 3 bits wide).
  typedef enum logic [2:0] {
    SEL_FI    = 3'd0,  // ADDRESS block, P address
    SEL_SE    = 3'd1,  // ADDRESS block, Q address
    SEL_COUNT = 3'd2,  // COUNT block, vectoring / clear address
    SEL_INP   = 3'd3,  // DISP block, external input address
    SEL_DIS   = 3'd4   // DISP block, display address
  } addr_sel_e;

  typedef logic signed [ANG_W-1:0] angle_t;

  localparam angle_t ATAN [MAX_ITER] = '{
    20'sd131072, 20'sd77376, 20'sd40884, 20'sd20753, 20'sd10417, 20'sd5213,
    20'sd2607,   20'sd1304,  20'sd652,   20'sd326,   20'sd163,   20'sd81,
    20'sd41,     20'sd20,    20'sd10,    20'sd5
  };

  // CORDIC gain after n iterations in Q2.14: K_Q14_TAB[n-1] = round(prod_{i<n}
  // sqrt(1 + 2^-2i) * 2^14).
  localparam int K_Q14_TAB [MAX_ITER] = '{
    23170, 25905, 26703, 26910, 26963, 26976, 26979, 26980,
    26980, 26981, 26981, 26981, 26981, 26981, 26981, 26981
  };

  // Gain of the default 16-iteration CORDIC.
  localparam int K_Q14 = K_Q14_TAB[MAX_ITER-1];

endpackage
