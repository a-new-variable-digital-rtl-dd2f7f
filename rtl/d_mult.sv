// Multiplier by the fractional delay d, built from shifts and additions only.
//
// p = floor(s * d / 2^DFRAC_W), where s is a signed W-bit word and d an unsigned
// DFRAC_W-bit fraction. Every set bit i of d adds a copy of s shifted left by i;
// the sum is formed DFRAC_W bits wider than s and then shifted right
// arithmetically by DFRAC_W, so only one truncation happens. Because d < 1 the
// result always fits in W bits.
//
// Building the multiplications by d from shifts and additions follows the
// design's intent for its table of delay values (each of which has at most two
// set bits); the single final truncation is this design's choice.
// Purely combinational.
module d_mult #(
  parameter int W       = 48,
  parameter int DFRAC_W = 4
) (
  input  logic signed [W-1:0]       s,
  input  logic        [DFRAC_W-1:0] d,
  output logic signed [W-1:0]       p
);

  logic signed [W+DFRAC_W-1:0] sum;
  logic signed [W+DFRAC_W-1:0] s_ext;
  logic signed [W+DFRAC_W-1:0] shifted;

  assign s_ext = (W + DFRAC_W)'(s);

  always_comb begin
    sum = '0;
    for (int i = 0; i < DFRAC_W; i++) begin
      shifted = s_ext <<< i;
      if (d[i]) sum = sum + shifted;
    end
  end

  // The low DFRAC_W bits are the discarded fraction.
  logic unused_frac;
  assign unused_frac = ^sum[DFRAC_W-1:0];
  assign p = sum[W+DFRAC_W-1:DFRAC_W];

endmodule
