// Partial-product generator of the 8x8 unsigned multiplier.
//
// Every bit of the multiplicand is ANDed with every bit of the multiplier:
// pp[n][m] = a[m] & b[n] carries weight 2^(m+n). The 64 bits form the dot
// diagram that the compressor tree reduces. Purely combinational.
// The AND array is the published design's; the pp[n][m] arrangement is a
// choice of this implementation.
module pp_gen
  import mac_pkg::*;
(
  input  logic [OP_W-1:0]            a,
  input  logic [OP_W-1:0]            b,
  output logic [OP_W-1:0][OP_W-1:0]  pp   // pp[n][m] = a[m] & b[n]
);

  always_comb begin
    for (int n = 0; n < OP_W; n++)
      pp[n] = a & {OP_W{b[n]}};
  end

endmodule
