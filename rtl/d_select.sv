// Delay-value select: maps a 3-bit index to the fractional part d of one of the
// eight delay values D = 1 + d that the filter supports:
//   dsel : 0     1       2      3       4     5      6    7
//   D    : 1     1.0625  1.125  1.1875  1.25  1.375  1.5  1.75
//   d*16 : 0     1       2      3       4     6      8    12
// The eight values follow the design example; encoding them as a 3-bit index
// and d as a 4-bit fraction is this design's choice. Purely combinational.
module d_select
  import vdf_pkg::*;
(
  input  logic [DSEL_W-1:0] dsel,
  output dfrac_t            d
);

  always_comb begin
    unique case (dsel)
      3'd0:    d = D_TABLE[0];
      3'd1:    d = D_TABLE[1];
      3'd2:    d = D_TABLE[2];
      3'd3:    d = D_TABLE[3];
      3'd4:    d = D_TABLE[4];
      3'd5:    d = D_TABLE[5];
      3'd6:    d = D_TABLE[6];
      default: d = D_TABLE[7];
    endcase
  end

endmodule
