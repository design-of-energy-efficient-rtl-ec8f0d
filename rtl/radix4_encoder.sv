// radix4_encoder: accurate radix-4 (modified Booth) digit encoder.
//
// For the bit triplet {b[2j+1], b[2j], b[2j-1]} of the multiplier it gives the
// digit y = -2*b[2j+1] + b[2j] + b[2j-1] in {0, +-1, +-2} as select signals:
// x1 when |y| = 1, x2 when |y| = 2, and neg = b[2j+1]. The digit set and the
// x1/x2/sign select lines follow the published scheme's radix-4 encoding and its
// partial product generator; the gate-level form of the encoder is not given
// there and this is the usual sum-of-products form. neg is simply the top
// bit, so the triplet 111 gives neg=1 with zero magnitude; the partial
// product generator and sign factor still produce 0 for it.
// Purely combinational.
module radix4_encoder
  import rad2k_pkg::*;
(
  input  logic [2:0] bits,  // {b[2j+1], b[2j], b[2j-1]}
  output r4_sel_t    sel
);
  always_comb begin
    sel.neg = bits[2];
    sel.x1  = bits[1] ^ bits[0];
    sel.x2  = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
  end
endmodule
