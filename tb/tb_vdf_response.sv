// Frequency-response testbench of vdf_top at its default size.
//
// For every D value of the design's table, in normal mode and (for D = 1.375,
// 1.5, 1.75) in CD-II mode, the testbench records the simulated impulse
// response and evaluates its magnitude response with a discrete-time Fourier
// sum, normalised to the DC gain. It checks:
//   * the response at the passband edge of that D is within 0.6 dB of DC;
//   * the whole stopband, from the stopband edge of that D up to Nyquist
//     (sampled on a 300-point grid), is attenuated by at least 34 dB in normal
//     mode and 27 dB in CD-II mode (the prototype designed for these edges
//     reaches 35 to 41 dB and 28 to 32 dB respectively);
//   * the -6 dB point lies between the two edges.
// Edges, in units of pi rad/sample:
//   D       1     1.0625 1.125  1.1875 1.25  1.375 1.5   1.75
//   pass    0.14  0.132  0.125  0.118  0.112 0.100 0.093 0.080
//   stop    0.20  0.188  0.178  0.168  0.160 0.146 0.133 0.114
//   CD-II pass / stop: 0.200/0.292 (1.375), 0.186/0.266 (1.5), 0.160/0.228 (1.75)
module tb_vdf_response;
  import vdf_pkg::*;

  localparam int  LEN = 260;
  localparam real PI  = 3.14159265358979323846;

  logic              clk = 0, rst_n = 0, in_valid = 0, cd_en = 0;
  sample_t           x = '0;
  logic [DSEL_W-1:0] dsel = '0;
  logic              out_valid;
  acc_t              y;

  int  checks = 0, failures = 0;
  real h [0:LEN-1];

  real fpass [0:7] = '{0.14, 0.132, 0.125, 0.118, 0.112, 0.100, 0.093, 0.080};
  real fstop [0:7] = '{0.20, 0.188, 0.178, 0.168, 0.160, 0.146, 0.133, 0.114};
  real cpass [0:7] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.200, 0.186, 0.160};
  real cstop [0:7] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.292, 0.266, 0.228};

  vdf_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .dsel(dsel),
    .cd_en(cd_en), .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  function automatic real mag_db(input real f);
    real re, im;
    re = 0.0;
    im = 0.0;
    for (int n = 0; n < LEN; n++) begin
      re += h[n] * $cos(PI * f * n);
      im -= h[n] * $sin(PI * f * n);
    end
    return 10.0 * $log10(re * re + im * im + 1.0e-30);
  endfunction

  task automatic capture();
    rst_n = 0;
    @(posedge clk);
    #1;
    rst_n = 1;
    for (int n = 0; n < LEN; n++) begin
      x = (n == 0) ? 16'sd32767 : 16'sd0;
      in_valid = 1;
      @(posedge clk);
      #1;
      h[n] = real'(y);
    end
    in_valid = 0;
  endtask

  task automatic judge(input string name, input real fp, input real fs, input real min_att);
    real g, p, worst, a, f6;
    g = mag_db(0.0);
    p = mag_db(fp) - g;
    worst = -1000.0;
    for (int i = 0; i <= 300; i++) begin
      a = mag_db(fs + (1.0 - fs) * i / 300.0) - g;
      if (a > worst) worst = a;
    end
    f6 = 0.0;
    for (int i = 0; i <= 400 && f6 == 0.0; i++)
      if (mag_db(i / 400.0) - g < -6.0) f6 = i / 400.0;
    $display("%s: passband edge %.3f: %.2f dB, stopband from %.3f: %.1f dB, -6 dB at %.4f",
             name, fp, p, fs, worst, f6);
    checks += 3;
    if (p < -0.6) begin
      failures++;
      $display("FAIL %s: passband droop %.2f dB", name, p);
    end
    if (worst > -min_att) begin
      failures++;
      $display("FAIL %s: stopband only %.1f dB", name, worst);
    end
    if (f6 <= fp || f6 >= fs) begin
      failures++;
      $display("FAIL %s: -6 dB point %.4f outside the transition band", name, f6);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      dsel = DSEL_W'(s);
      cd_en = 0;
      capture();
      judge($sformatf("D index %0d", s), fpass[s], fstop[s], 34.0);
      if (cpass[s] > 0.0) begin
        cd_en = 1;
        capture();
        judge($sformatf("D index %0d, CD-II", s), cpass[s], cstop[s], 27.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
