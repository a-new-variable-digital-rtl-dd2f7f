// End-to-end testbench of vdf_top at its default size (order 80, 80 FD stages).
//
//  1. D = 1, normal mode: the impulse response must be the prototype
//     coefficients themselves, A*h[n]*2^G for n = 0..80, then zero.
//  2. For each of the eight D values: impulse response compared sample by sample
//     with a 64-bit integer model of the whole chain; its peak must sit at
//     40*D (+-1) samples and its height, relative to the input, must match the
//     cutoff fc/D of the design's table (0.17, 0.16, 0.152, 0.143, 0.136, 0.124,
//     0.113, 0.097) within 2%.
//  3. CD-II mode at D = 1: the impulse response must be h[0], h[2], ..., h[80];
//     then every D value with CD-II against the model.
//  4. A random input stream with D and the CD-II mode switched on the fly and
//     gaps in in_valid, compared with the model on every output; latency 1.
// Mechanisms counted: each D value used, CD-II samples, D switches and mode
// switches during a stream, samples held by in_valid low. One never seen fails.
module tb_vdf_top;
  import vdf_pkg::*;
  import vdf_ref_pkg::*;

  logic              clk = 0, rst_n = 0, in_valid = 0, cd_en = 0;
  sample_t           x = '0;
  logic [DSEL_W-1:0] dsel = '0;
  logic              out_valid;
  acc_t              y;

  int checks = 0, failures = 0;
  int dsel_used [0:7];
  int n_cd = 0, n_dswitch = 0, n_cdswitch = 0, n_gap = 0;

  // Model state: the two registers of every FD stage.
  longint r1 [1:N_ORDER];
  longint r2 [1:N_ORDER];

  // Table values in units of 1/16 and cutoffs in units of 1/1000.
  int d16   [0:7] = '{0, 1, 2, 3, 4, 6, 8, 12};
  int fc_m  [0:7] = '{170, 160, 152, 143, 136, 124, 113, 97};

  vdf_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .dsel(dsel),
    .cd_en(cd_en), .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  function automatic void model_reset();
    for (int t = 1; t <= N_ORDER; t++) begin
      r1[t] = 0;
      r2[t] = 0;
    end
  endfunction

  // One sample through the model; returns the chain output.
  function automatic longint model_step(input longint xv, input int k, input bit cd);
    longint acc, fd, prev;
    acc = xv * longint'(coef(0)) * 16;
    for (int t = 1; t <= N_ORDER; t++) begin
      prev = acc;
      fd = fd_ref(prev, r1[t], r2[t], k);
      acc = ((cd && (t % 2 == 0)) ? prev : fd)
          + ((cd && (t % 2 == 1)) ? 0 : xv * longint'(coef(t)) * 16);
      r2[t] = r1[t];
      r1[t] = prev;
    end
    return acc;
  endfunction

  task automatic do_reset();
    rst_n = 0;
    in_valid = 0;
    @(posedge clk);
    #1;
    rst_n = 1;
    model_reset();
  endtask

  // Drive one sample, clock it, return the registered output after checking it.
  task automatic send(input longint xv, output longint got);
    longint want;
    x = sample_t'(xv);
    in_valid = 1;
    want = model_step(xv, d16[dsel], cd_en);
    dsel_used[dsel]++;
    if (cd_en) n_cd++;
    @(posedge clk);
    #1;
    in_valid = 0;
    got = longint'(y);
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL out_valid low one cycle after a sample");
    end
    expect_eq(got, want, "model");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam longint A = 32767;
    longint got, peak;
    int peak_i, ratio_m;
    for (int i = 0; i < 8; i++) dsel_used[i] = 0;

    // 1. D = 1: impulse response equals the prototype coefficients
    do_reset();
    dsel = 3'd0;
    cd_en = 0;
    for (int n = 0; n < 100; n++) begin
      send((n == 0) ? A : 0, got);
      expect_eq(got, (n <= N_ORDER) ? A * longint'(coef(n)) * 16 : 0,
                $sformatf("D=1 impulse n=%0d", n));
    end

    // 2. each D value: peak position and height
    for (int s = 0; s < 8; s++) begin
      do_reset();
      dsel = DSEL_W'(s);
      peak = 0;
      peak_i = 0;
      for (int n = 0; n < 200; n++) begin
        send((n == 0) ? A : 0, got);
        if (got > peak) begin
          peak = got;
          peak_i = n;
        end
      end
      checks++;
      // 40*D = 40 + 40*d16/16
      if ((peak_i * 16 - (640 + 40 * d16[s])) > 16 || ((640 + 40 * d16[s]) - peak_i * 16) > 16) begin
        failures++;
        $display("FAIL D index %0d: peak at %0d", s, peak_i);
      end
      // peak / (A * 2^21) in units of 1/1000, compared with fc/D within 2%
      ratio_m = int'((peak * 1000 * 1000) / (A * (longint'(1) <<< 21)));
      checks++;
      if (ratio_m * 50 > fc_m[s] * 1000 * 51 || ratio_m * 50 < fc_m[s] * 1000 * 49) begin
        failures++;
        $display("FAIL D index %0d: peak height %0d/1e6, expected about %0d/1e3", s, ratio_m, fc_m[s]);
      end
      $display("D index %0d: peak at sample %0d, height %0d/1e6 of input", s, peak_i, ratio_m);
    end

    // 3. CD-II at D = 1: every second coefficient, closed up
    do_reset();
    dsel = 3'd0;
    cd_en = 1;
    for (int n = 0; n < 60; n++) begin
      send((n == 0) ? A : 0, got);
      expect_eq(got, (n <= N_HALF) ? A * longint'(coef(2 * n)) * 16 : 0,
                $sformatf("CD-II impulse n=%0d", n));
    end
    for (int s = 1; s < 8; s++) begin
      do_reset();
      dsel = DSEL_W'(s);
      for (int n = 0; n < 120; n++) send((n == 0) ? -A : 0, got);
    end

    // 4. random stream with on-the-fly switching and in_valid gaps
    do_reset();
    cd_en = 0;
    dsel = 3'd0;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 99) == 0) begin
        dsel = DSEL_W'($urandom);
        n_dswitch++;
      end
      if ($urandom_range(0, 299) == 0) begin
        cd_en = ~cd_en;
        n_cdswitch++;
      end
      if ($urandom_range(0, 49) == 0) begin
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
        n_gap++;
        checks++;
        if (out_valid) begin
          failures++;
          $display("FAIL out_valid high without an input sample");
        end
      end
      send(longint'($signed(16'($urandom))), got);
    end

    for (int s = 0; s < 8; s++) begin
      checks++;
      if (dsel_used[s] == 0) begin
        failures++;
        $display("FAIL D index %0d never used", s);
      end
    end
    checks++;
    if (n_cd == 0 || n_dswitch == 0 || n_cdswitch == 0 || n_gap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: cd2_samples=%0d d_switches=%0d cd_switches=%0d gaps=%0d",
             n_cd, n_dswitch, n_cdswitch, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
