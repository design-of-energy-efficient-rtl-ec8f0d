// rad2k_pkg: types shared by the encoders and partial product generators of
// the hybrid high-radix (RAD2^k) approximate multiplier.
//
// r4_sel_t carries the select signals of one accurate radix-4 digit
// (0, +-1, +-2 times the multiplicand). hr_sel_t carries the select signals
// of the single approximate radix-2^k digit, whose magnitude is restricted to
// 0 or one of the four powers of two 2^(k-4) .. 2^(k-1); x[i] selects
// 2^(k-4+i), so the same four select lines serve every k. In both, neg marks
// a digit whose partial product is inverted and completed by a sign factor.
package rad2k_pkg;

  typedef struct packed {
    logic neg;  // digit is negative: invert the row, add the sign factor
    logic x1;   // |digit| == 1
    logic x2;   // |digit| == 2
  } r4_sel_t;

  typedef struct packed {
    logic       neg;  // digit is negative
    logic [3:0] x;    // one-hot (or zero): x[i] means |digit| == 2^(k-4+i)
  } hr_sel_t;

endpackage
