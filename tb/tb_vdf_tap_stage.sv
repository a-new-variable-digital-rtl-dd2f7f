// Self-checking testbench of vdf_tap_stage. An odd stage (TAP = 1) and an even
// stage (TAP = 2) are driven with the same random partial sums, products and
// fractional delays, in both normal and CD-II mode, and compared with a model:
//   normal:        acc_out = FD(acc_in) + prod
//   CD-II, odd:    acc_out = FD(acc_in)
//   CD-II, even:   acc_out = acc_in + prod
// The FD registers of both stages advance on every sample, also while bypassed.
module tb_vdf_tap_stage;
  import vdf_pkg::*;
  import vdf_ref_pkg::*;

  logic   clk = 0, rst_n = 0, en = 0, cd_en = 0;
  dfrac_t d = '0;
  acc_t   acc_in = '0, prod = '0, out_odd, out_even;
  int checks = 0, failures = 0;
  int n_cd = 0, n_normal = 0;
  longint h1 = 0, h2 = 0;

  vdf_tap_stage #(.TAP(1)) dut_odd (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .cd_en(cd_en),
    .acc_in(acc_in), .prod(prod), .acc_out(out_odd));
  vdf_tap_stage #(.TAP(2)) dut_even (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .cd_en(cd_en),
    .acc_in(acc_in), .prod(prod), .acc_out(out_even));

  always #5 clk = ~clk;

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
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
    longint a, p, fd;
    @(posedge clk);
    #1;
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 9) == 0) d = dfrac_t'($urandom);
      if ($urandom_range(0, 19) == 0) cd_en = ~cd_en;
      a = longint'($signed($urandom)) <<< $urandom_range(0, 10);
      p = longint'($signed($urandom)) <<< $urandom_range(0, 8);
      acc_in = acc_t'(a);
      prod   = acc_t'(p);
      #1;
      fd = fd_ref(a, h1, h2, int'(d));
      if (cd_en) begin
        n_cd++;
        expect_eq(longint'(out_odd),  fd,    "odd stage, CD-II");
        expect_eq(longint'(out_even), a + p, "even stage, CD-II");
      end else begin
        n_normal++;
        expect_eq(longint'(out_odd),  fd + p, "odd stage");
        expect_eq(longint'(out_even), fd + p, "even stage");
      end
      en = 1;
      @(posedge clk);
      #1;
      en = 0;
      h2 = h1;
      h1 = a;
    end
    checks++;
    if (n_cd == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a mode was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
