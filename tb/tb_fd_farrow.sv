// Self-checking testbench of fd_farrow.
//  1. Impulse response for all 16 values of d (impulse of 4096, exact in the
//     stage's arithmetic): must be the Lagrange taps 8k(k-16), 4096-16k^2,
//     8k(k+16) for d = k/16, then zero. At d = 0 this is a unit delay.
//  2. Random samples with d changed at random: each output must lie within
//     3 LSB of the ideal interpolator, and equal the integer reference exactly.
//  3. Reset clears both registers; en low holds them.
module tb_fd_farrow;
  import vdf_ref_pkg::*;
  localparam int W = 48;
  localparam int DFRAC_W = 4;

  logic clk = 0, rst_n = 0, en = 0;
  logic [DFRAC_W-1:0] d = '0;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0;
  longint h1 = 0, h2 = 0;   // model of the two registers

  fd_farrow #(.W(W), .DFRAC_W(DFRAC_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .x(x), .y(y));

  always #5 clk = ~clk;

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  // Apply one sample: check the output against the reference, then clock it in.
  task automatic step(input longint xv, input bit exact_only, output longint yo);
    longint ideal;
    x = W'(xv);
    #1;
    yo = longint'(y);
    expect_eq(longint'(y), fd_ref(xv, h1, h2, int'(d)), "reference");
    if (!exact_only) begin
      ideal = fd_exact512(xv, h1, h2, int'(d));
      checks++;
      if (longint'(y) * 512 - ideal > 3 * 512 || ideal - longint'(y) * 512 > 3 * 512) begin
        failures++;
        $display("FAIL accuracy: y=%0d ideal*512=%0d", y, ideal);
      end
    end
    en = 1;
    @(posedge clk);
    #1;
    en = 0;
    h2 = h1;
    h1 = xv;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r, yo;
    int k;
    @(posedge clk);
    #1;
    rst_n = 1;
    // 1. impulse responses
    for (k = 0; k < 16; k++) begin
      d = DFRAC_W'(k);
      step(4096, 1'b1, yo);
      expect_eq(yo, 8 * k * (k - 16), $sformatf("h0 d=%0d/16", k));
      step(0, 1'b1, yo);
      expect_eq(yo, 4096 - 16 * k * k, $sformatf("h1 d=%0d/16", k));
      step(0, 1'b1, yo);
      expect_eq(yo, 8 * k * (k + 16), $sformatf("h2 d=%0d/16", k));
      step(0, 1'b1, yo);
      expect_eq(yo, 0, $sformatf("h3 d=%0d/16", k));
    end
    // 2. random samples, random d
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 7) == 0) d = DFRAC_W'($urandom);
      r = longint'($signed($urandom)) <<< ($urandom_range(0, 12));
      step(r, 1'b0, yo);
    end
    // 3. en low holds, reset clears
    d = 4'd8;
    x = 48'sd1000;
    repeat (3) @(posedge clk);
    #1;
    expect_eq(longint'(y), fd_ref(1000, h1, h2, 8), "hold with en low");
    rst_n = 0;
    @(posedge clk);
    #1;
    rst_n = 1;
    h1 = 0;
    h2 = 0;
    x = '0;
    #1;
    expect_eq(longint'(y), 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
