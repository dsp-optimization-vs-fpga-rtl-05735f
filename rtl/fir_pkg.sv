// fir_pkg: sizes, types and the default coefficient set shared by the FIR
// filters. The filter is an 8-tap FIR, y(n) = sum_{k=0..7} b(k) x(n-k), on
// 16-bit two's-complement samples and 16-bit coefficients, with 32-bit sums.
// Tap count and the 16/16/32-bit widths follow the published circuit; the
// coefficient values, which it leaves open, are this design's choice: a
// symmetric integer low-pass {1,2,3,4,4,3,2,1}.
package fir_pkg;

  localparam int TAPS   = 8;
  localparam int DATA_W = 16;
  localparam int COEF_W = 16;
  localparam int ACC_W  = 32;

  // Coefficients packed as COEFS[k] = b(k); element 0 is the tap applied to
  // the newest sample.
  localparam logic [TAPS-1:0][COEF_W-1:0] DEFAULT_COEFS = '{
    16'sd1, 16'sd2, 16'sd3, 16'sd4, 16'sd4, 16'sd3, 16'sd2, 16'sd1
  };

  // States of the sequential filter's controller.
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,
    S_INIT = 3'd1,
    S_CMPT = 3'd2,
    S_TEST = 3'd3,
    S_DONE = 3'd4
  } seq_state_t;

endpackage
