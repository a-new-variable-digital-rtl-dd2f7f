// Self-checking testbench of d_mult: every d value against random and extreme
// multiplicands, compared with floor(s*d/16) computed by 64-bit multiplication.
module tb_d_mult;
  localparam int W = 48;
  localparam int DFRAC_W = 4;

  logic signed [W-1:0] s, p;
  logic [DFRAC_W-1:0]  d;
  int checks = 0, failures = 0;

  d_mult #(.W(W), .DFRAC_W(DFRAC_W)) dut (.s(s), .d(d), .p(p));

  task automatic check(input longint sv, input int dv);
    longint expect_v;
    s = W'(sv);
    d = DFRAC_W'(dv);
    #1;
    expect_v = (sv * dv) >>> 4;
    checks++;
    if (longint'(p) != expect_v) begin
      failures++;
      $display("FAIL s=%0d d=%0d p=%0d expected %0d", sv, dv, p, expect_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r;
    for (int dv = 0; dv < 16; dv++) begin
      check(0, dv);
      check(1, dv);
      check(-1, dv);
      check(-(longint'(1) <<< (W-1)), dv);
      check((longint'(1) <<< (W-1)) - 1, dv);
      for (int i = 0; i < 200; i++) begin
        r = longint'({$urandom, $urandom});
        r = r <<< (64 - W);
        r = r >>> (64 - W);   // sign-extend a random W-bit value
        check(r, dv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
