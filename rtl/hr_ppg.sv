// hr_ppg: partial product row for the approximate high-radix digit.
//
// With the digit restricted to 0 or +-2^(k-4+s), s = 0..3, the row is A
// shifted by one of four amounts, selected bit by bit as in the published scheme's
// radix-64/256/1024 generators:
//   pp[i] = ((x[3] & a[i-3]) | (x[2] & a[i-2]) | (x[1] & a[i-1]) | (x[0] & a[i])) ^ neg
// where a[] is the multiplicand sign-extended above and zero below. The row
// is indexed from weight 2^(k-4): every bit below that weight would be the
// constant neg, so those bits are left out and the sign factor is added at
// weight 2^(k-4) instead (both give the same two's complement value). The
// row has N+3 bits, enough for 8A in two's complement, so the module itself
// does not depend on k. Purely combinational.
module hr_ppg
  import rad2k_pkg::*;
#(
  parameter int N = 16  // multiplicand width
) (
  input  logic [N-1:0] a,    // multiplicand, two's complement
  input  hr_sel_t      sel,  // high-radix select signals
  output logic [N+2:0] pp    // row at weight 2^(k-4), one's complement when neg
);
  logic [N+5:0] ax;  // {3 sign copies, a, 3 zeros}: ax[i+3] = a[i]
  assign ax = {{3{a[N-1]}}, a, 3'b000};

  always_comb begin
    for (int i = 0; i <= N+2; i++)
      pp[i] = ((sel.x[3] & ax[i])   | (sel.x[2] & ax[i+1]) |
               (sel.x[1] & ax[i+2]) | (sel.x[0] & ax[i+3])) ^ sel.neg;
  end
endmodule
