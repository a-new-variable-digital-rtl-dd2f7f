// One tap of the variable filter's transposed chain: an FD stage followed by
// the tap adder.
//
//   acc_out = FD(acc_in) + prod        (normal operation)
//
// Coefficient decimation by 2 (CD-II) keeps every second coefficient and closes
// up the gaps, which doubles the passband width and transition band. In the
// transposed chain this is done per stage with cd_en high:
//   * an even stage (TAP even) bypasses its FD:  acc_out = acc_in + prod
//   * an odd stage (TAP odd) drops its product:  acc_out = FD(acc_in)
// so h[0], h[2], ..., h[N_ORDER] end up separated by one FD each. The FD and
// adder follow the published structure; the bypass and product masking are
// this design's way of combining it with CD-II.
//
// Timing: acc_out is combinational from acc_in, prod and the FD registers; the
// FD registers advance on a clock edge with en high (also while bypassed).
module vdf_tap_stage
  import vdf_pkg::*;
#(
  parameter int TAP = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  dfrac_t d,
  input  logic   cd_en,
  input  acc_t   acc_in,
  input  acc_t   prod,
  output acc_t   acc_out
);

  localparam bit ODD = (TAP % 2) == 1;

  acc_t fd_out;
  acc_t delayed;
  acc_t addend;

  fd_farrow #(.W(ACC_W), .DFRAC_W(DFRAC_W)) u_fd (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (d),
    .x    (acc_in),
    .y    (fd_out)
  );

  assign delayed = (cd_en && !ODD) ? acc_in : fd_out;
  assign addend  = (cd_en && ODD)  ? '0     : prod;
  assign acc_out = delayed + addend;

endmodule
