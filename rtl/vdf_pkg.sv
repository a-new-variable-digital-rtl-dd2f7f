// Shared constants of the fractional-delay variable digital filter (VDF).
//
// The filter is an order-80 lowpass FIR filter with fixed coefficients in which
// every unit delay is replaced by a 2nd-order fractional-delay (FD) stage.
// Word widths and number formats are this design's own choice:
//   * input samples are X_W-bit signed integers;
//   * coefficients are COEF_W-bit signed with COEF_FRAC fraction bits (Q1.17);
//   * the partial sums of the transposed chain are ACC_W bits wide and carry
//     G extra fraction bits below the product LSB, so that the halvings and the
//     multiplications by d inside each FD stage lose little precision;
//   * the fractional delay d is an unsigned DFRAC_W-bit fraction (units of 1/16),
//     which holds every delay value of the design's table exactly.
//
// Prototype coefficients (the order and band edges follow the design example;
// the design method is this design's own choice, because the coefficients
// themselves are not published): a Kaiser-windowed sinc
//   h[n] = round( 2^17 * 2*fc * sinc(2*fc*(n-40)) * I0(beta*sqrt(1-((n-40)/40)^2)) / I0(beta) )
// with n = 0..80, fc = 0.085 cycles/sample (cutoff 0.17 in units of pi rad/sample,
// midway between the passband edge 0.14 and the stopband edge 0.20) and beta = 3.7.
// The coefficients are symmetric, h[n] = h[80-n]; only h[0..40] are listed.
// Passband ripple is about +-0.07 dB and the stopband is below -40 dB.
package vdf_pkg;

  localparam int N_ORDER   = 80;             // order of the prototype filter
  localparam int N_HALF    = N_ORDER / 2;    // index of the centre coefficient
  localparam int X_W       = 16;             // input sample width
  localparam int COEF_W    = 18;             // coefficient width
  localparam int COEF_FRAC = 17;             // coefficient fraction bits
  localparam int DFRAC_W   = 4;              // fraction bits of d
  localparam int G         = 4;              // guard fraction bits of the chain
  localparam int ACC_W     = 48;             // width of the chain's partial sums
  localparam int DSEL_W    = 3;              // width of the delay-value select

  typedef logic signed [X_W-1:0]    sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [DFRAC_W-1:0]       dfrac_t;

  // h[0] .. h[40]
  localparam coef_t H_HALF [0:N_HALF] = '{
   18'sd70, 18'sd132, 18'sd170, 18'sd159, 18'sd86, -18'sd42, -18'sd197, -18'sd331,
   -18'sd391, -18'sd336, -18'sd155, 18'sd123, 18'sd429, 18'sd668, 18'sd746, 18'sd602,
   18'sd234, -18'sd289, -18'sd831, -18'sd1223, -18'sd1309, -18'sd1000, -18'sd311, 18'sd619,
   18'sd1548, 18'sd2187, 18'sd2274, 18'sd1660, 18'sd377, -18'sd1335, -18'sd3055, -18'sd4258,
   -18'sd4429, -18'sd3192, -18'sd421, 18'sd3696, 18'sd8669, 18'sd13778, 18'sd18209, 18'sd21217,
   18'sd22282
  };

  // Full coefficient index 0..N_ORDER, folded onto the stored half.
  function automatic coef_t coef(input int k);
    return (k <= N_HALF) ? H_HALF[k] : H_HALF[N_ORDER - k];
  endfunction

  // The eight delay values D = 1 + d of the design's table, as d in units of 1/16:
  // D = 1, 1.0625, 1.125, 1.1875, 1.25, 1.375, 1.5, 1.75.
  localparam dfrac_t D_TABLE [0:7] = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd6, 4'd8, 4'd12};

endpackage
