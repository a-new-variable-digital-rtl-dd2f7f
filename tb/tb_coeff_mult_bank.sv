// Self-checking testbench of coeff_mult_bank. With x = 1 the products are the
// coefficients themselves (times 2^G): the testbench checks their symmetry, the
// centre value and the coefficient sum (the DC gain, 131378/2^17 = 1.0023).
// With random x it checks every product against x*h[k]*2^G.
module tb_coeff_mult_bank;
  import vdf_pkg::*;

  sample_t x;
  acc_t    prod [0:N_ORDER];
  int checks = 0, failures = 0;

  coeff_mult_bank dut (.x(x), .prod(prod));

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    x = 16'sd1;
    #1;
    sum = 0;
    for (int k = 0; k <= N_ORDER; k++) begin
      sum += longint'(prod[k]);
      expect_eq(longint'(prod[k]), longint'(prod[N_ORDER-k]), $sformatf("symmetry k=%0d", k));
    end
    expect_eq(sum, 131378 * 16, "coefficient sum");
    expect_eq(longint'(prod[40]), 22282 * 16, "centre coefficient");
    expect_eq(longint'(prod[0]), 70 * 16, "first coefficient");
    for (int i = 0; i < 100; i++) begin
      x = (i == 0) ? -16'sd32768 : (i == 1) ? 16'sd32767 : sample_t'($urandom);
      #1;
      for (int k = 0; k <= N_ORDER; k++)
        expect_eq(longint'(prod[k]), longint'(x) * longint'(coef(k)) * 16,
                  $sformatf("x=%0d k=%0d", x, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
