// Variable digital lowpass filter based on fractional delay.
//
// An order-80 FIR lowpass filter with fixed coefficients is built in transposed
// direct form, and each of its 80 unit delays is replaced by a 2nd-order
// fractional-delay stage (fd_farrow) that delays by D = 1 + d samples. Stretching
// every delay by D stretches the impulse response by D and lowers its peak by
// 1/D, so the cutoff frequency becomes fc/D and the transition band narrows
// with it, while the coefficients never change. One 3-bit select (dsel) picks
// one of eight D values (1 ... 1.75), giving cutoffs from 0.17 down to about
// 0.097 (units of pi rad/sample). With cd_en high the chain uses only every
// second coefficient (coefficient decimation by 2), which doubles the cutoff
// and transition band of whatever D gives.
//
// Structure: coeff_mult_bank forms h[k]*x for all taps (41 distinct products);
// tap 0 feeds the chain directly, and vdf_tap_stage k = 1..80 passes the
// partial sum through its FD stage and adds h[k]*x. The last partial sum is
// registered as the output. The chain, the FD stage and the D values follow the
// published design; the number formats, the sample-enable interface, the reset,
// the output register and the CD-II realisation are this design's choices.
//
// Interface and timing: one sample is accepted on each clock edge with in_valid
// high; y and out_valid appear on the next clock edge (latency 1). dsel and
// cd_en may change between any two samples and take effect on the sample that
// sees them. y is h*x scaled by 2^(COEF_FRAC+G) = 2^21 (DC gain about 1.0).
// Note that, as in the published structure, each FD stage has a direct path
// from its input to its output (the d(d-1)/2 tap), so the combinational path
// runs through all 80 stages; a high clock rate would need the chain pipelined.
module vdf_top
  import vdf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  sample_t           x,
  input  logic [DSEL_W-1:0] dsel,
  input  logic              cd_en,
  output logic              out_valid,
  output acc_t              y
);

  dfrac_t d;
  acc_t   prod  [0:N_ORDER];
  acc_t   chain [0:N_ORDER];

  d_select u_dsel (.dsel(dsel), .d(d));

  coeff_mult_bank u_bank (.x(x), .prod(prod));

  assign chain[0] = prod[0];

  for (genvar k = 1; k <= N_ORDER; k++) begin : g_tap
    vdf_tap_stage #(.TAP(k)) u_stage (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (in_valid),
      .d      (d),
      .cd_en  (cd_en),
      .acc_in (chain[k-1]),
      .prod   (prod[k]),
      .acc_out(chain[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= chain[N_ORDER];
    end
  end

  // Every accepted sample yields exactly one output on the next clock.
  a_one_output_per_sample: assert property (
    @(posedge clk) disable iff (!rst_n) in_valid |=> out_valid);
  a_no_output_without_sample: assert property (
    @(posedge clk) disable iff (!rst_n) !in_valid |=> !out_valid);

endmodule
