// radix4_ppg: partial product row for one accurate radix-4 digit.
//
// Each bit is pp[i] = ((x1 & a[i]) | (x2 & a[i-1])) ^ neg, with a[-1] = 0 and
// a[N] = a[N-1] (sign extension), which is the per-bit selection of the
// published scheme's radix-4 partial product generator. The row is N+1 bits wide so
// that 2A fits. For a negative digit the row holds the one's complement of
// |y|*A; the sign factor (neg, added at the row's least significant weight)
// completes the two's complement and is added in the accumulation tree.
// Purely combinational.
module radix4_ppg
  import rad2k_pkg::*;
#(
  parameter int N = 16  // multiplicand width
) (
  input  logic [N-1:0] a,    // multiplicand, two's complement
  input  r4_sel_t      sel,  // digit select signals
  output logic [N:0]   pp    // partial product row, one's complement when neg
);
  logic [N+1:0] ax;  // {a[N], a[N-1:0], a[-1]}: sign-extended, with a zero below
  assign ax = {a[N-1], a, 1'b0};

  always_comb begin
    for (int i = 0; i <= N; i++)
      pp[i] = ((sel.x1 & ax[i+1]) | (sel.x2 & ax[i])) ^ sel.neg;
  end
endmodule
