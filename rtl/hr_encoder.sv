// hr_encoder: approximate radix-2^k encoder for the k least significant bits
// of the multiplier.
//
// The k LSBs b[k-1:0] form the signed digit y0 = -2^(k-1)*b[k-1] +
// sum_{i<k-1} b[i]*2^i (b[k-1] also serves as the carry-in bit of the first
// radix-4 digit above it). The encoder replaces y0 by the nearest value of the
// set {0, +-2^(k-4), +-2^(k-3), +-2^(k-2), +-2^(k-1)}, which is the set of
// partial products the published scheme lists for the radix-64 .. radix-4096
// encodings, so only four shift selects and a sign are needed.
// The published scheme gives the rounding target (nearest power of two) but not the
// encoder circuit or the tie rule; here the magnitude |y0| is compared with
// the midpoints between neighbouring candidates and a tie goes to the larger
// magnitude. neg is b[k-1]; a negative y0 that rounds to 0 therefore gives
// neg=1 with no select, which the sign factor cancels.
// Purely combinational. K must be even and at least 4.
module hr_encoder
  import rad2k_pkg::*;
#(
  parameter int K = 8  // number of multiplier LSBs in the high-radix digit
) (
  input  logic [K-1:0] bits,  // b[k-1:0]
  output hr_sel_t      sel
);
  // Midpoints between candidate magnitudes, doubled to stay integral:
  // 2|y0| >= 3*2^(k-2) -> 2^(k-1); >= 3*2^(k-3) -> 2^(k-2);
  // >= 3*2^(k-4) -> 2^(k-3); >= 2^(k-4) -> 2^(k-4); otherwise 0.
  localparam logic [K+1:0] T3 = (K+2)'(3) << (K-2);
  localparam logic [K+1:0] T2 = (K+2)'(3) << (K-3);
  localparam logic [K+1:0] T1 = (K+2)'(3) << (K-4);
  localparam logic [K+1:0] T0 = (K+2)'(1) << (K-4);

  logic [K-1:0] mag;   // |y0|, at most 2^(k-1)
  logic [K+1:0] mag2;  // 2*|y0|

  always_comb begin
    mag  = bits[K-1] ? (~bits + 1'b1) : bits;
    mag2 = {1'b0, mag, 1'b0};
    sel.neg = bits[K-1];
    sel.x   = 4'b0000;
    if      (mag2 >= T3) sel.x = 4'b1000;
    else if (mag2 >= T2) sel.x = 4'b0100;
    else if (mag2 >= T1) sel.x = 4'b0010;
    else if (mag2 >= T0) sel.x = 4'b0001;
  end

  if (K < 4 || K % 2 != 0) begin : g_bad_k
    $error("hr_encoder: K must be even and >= 4");
  end
endmodule
