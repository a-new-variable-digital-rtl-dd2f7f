// Second-order fractional-delay (FD) stage: modified Farrow structure of
// Lagrange interpolation.
//
// The stage delays its input by D = 1 + d samples, 0 <= d < 1. With x0 = x(n),
// x1 = x(n-1) and x2 = x(n-2), held in two registers, it computes
//   a  = x0/2,  b = x2/2               (arithmetic shifts)
//   s2 = a - x1 + b
//   s3 = d*s2 - a + b
//   y  = x1 + d*s3
// which equals the Lagrange interpolator
//   y = d(d-1)/2 * x0 + (1-d^2) * x1 + d(d+1)/2 * x2.
// At d = 0 it is a plain unit delay. The adder signs, the two multipliers by d
// and the halvings of x0 and x2 follow the published structure. Word widths, the
// truncating arithmetic shifts, the enable and the reset are this design's
// choices. The internal sums are two bits wider than W; y is truncated back to
// W bits, and the caller provides the headroom (the stage's gain
// |h0|+|h1|+|h2| = 1 + d - d^2 never exceeds 1.25).
//
// Timing: y is combinational from x and the registers; the registers advance
// by one sample on a clock edge with en high. Synchronous active-low reset.
module fd_farrow #(
  parameter int W       = 48,
  parameter int DFRAC_W = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic        [DFRAC_W-1:0] d,
  input  logic signed [W-1:0]       x,
  output logic signed [W-1:0]       y
);

  localparam int IW = W + 2;

  logic signed [W-1:0]  x1_q, x2_q;
  logic signed [IW-1:0] a, b, s2, s3, m1, m2, y_w;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1_q <= '0;
      x2_q <= '0;
    end else if (en) begin
      x1_q <= x;
      x2_q <= x1_q;
    end
  end

  assign a  = IW'(x) >>> 1;
  assign b  = IW'(x2_q) >>> 1;
  assign s2 = a - IW'(x1_q) + b;

  d_mult #(.W(IW), .DFRAC_W(DFRAC_W)) u_mul1 (.s(s2), .d(d), .p(m1));

  assign s3 = m1 - a + b;

  d_mult #(.W(IW), .DFRAC_W(DFRAC_W)) u_mul2 (.s(s3), .d(d), .p(m2));

  assign y_w = IW'(x1_q) + m2;

  // The two top bits of y_w are headroom that the caller keeps unused.
  logic unused_top;
  assign unused_top = ^y_w[IW-1 -: 2];
  assign y = y_w[W-1:0];

endmodule
