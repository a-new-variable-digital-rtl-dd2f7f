// Fixed-coefficient multiplier bank of the transposed FIR filter.
//
// The input sample is broadcast to every tap and multiplied by the prototype
// coefficients h[0..N_ORDER]. Because the coefficients are symmetric,
// h[k] = h[N_ORDER-k], only the N_HALF+1 distinct products are formed and each
// drives two taps, halving the number of multipliers as the design intends.
// Each product is sign-extended to the chain width and shifted left by G guard
// bits, so prod[k] = h[k] * x * 2^G (scale 2^(COEF_FRAC+G) per unit of x).
// The coefficients are constants, so synthesis reduces every multiplier to
// shifts and additions. The low G bits of every product are zero by
// construction and are kept only to line the products up with the chain's
// guard bits. Purely combinational.
module coeff_mult_bank
  import vdf_pkg::*;
(
  input  sample_t x,
  output acc_t    prod [0:N_ORDER]
);

  acc_t half_prod [0:N_HALF];

  always_comb begin
    for (int k = 0; k <= N_HALF; k++) begin
      half_prod[k] = acc_t'(x * H_HALF[k]) <<< G;
    end
    for (int k = 0; k <= N_ORDER; k++) begin
      prod[k] = (k <= N_HALF) ? half_prod[k] : half_prod[N_ORDER - k];
    end
  end

endmodule
