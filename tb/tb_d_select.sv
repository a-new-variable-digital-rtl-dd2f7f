// Self-checking testbench of d_select: every index must give the delay value
// D = 1 + d of the design's table (D*16 = 16, 17, 18, 19, 20, 22, 24, 28).
module tb_d_select;
  import vdf_pkg::*;

  logic [DSEL_W-1:0] dsel;
  dfrac_t            d;
  int checks = 0, failures = 0;
  int d16 [0:7] = '{16, 17, 18, 19, 20, 22, 24, 28};

  d_select dut (.dsel(dsel), .d(d));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      dsel = DSEL_W'(i);
      #1;
      checks++;
      if (16 + int'(d) != d16[i]) begin
        failures++;
        $display("FAIL dsel=%0d d=%0d expected D*16=%0d", i, d, d16[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
