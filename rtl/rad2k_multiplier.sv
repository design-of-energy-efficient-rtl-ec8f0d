// rad2k_multiplier: N x N signed approximate multiplier with hybrid high-radix
// encoding (RAD2^k; RAD256 for the default K = 8).
//
// The multiplier B is split in two. Its N-K most significant bits are encoded
// exactly with radix-4 digits y_j = -2 b[2j+1] + b[2j] + b[2j-1],
// j = K/2 .. N/2-1 (b[K-1] is the low bit of the first triplet). Its K least
// significant bits form one signed digit y0 (the value of b[K-1:0] as a K-bit
// two's complement number), which hr_encoder rounds to the nearest of
// 0, +-2^(K-4) .. +-2^(K-1). The product is therefore
//   p = A * (B - y0 + round(y0))  (exact in 2N bits),
// so the error depends only on the K LSBs of B and is zero whenever y0 is
// already one of the candidate values. The high-radix row replaces K/2
// radix-4 rows, which is where area and energy are saved.
//
// Datapath: one hr_encoder + hr_ppg row and (N-K)/2 radix4_encoder +
// radix4_ppg rows, plus one correction row, are summed by wallace_tree and
// the two resulting rows by prefix_adder. The correction row merges
//  - the sign factors: the neg bit of each row at that row's lowest weight,
//    which completes the one's complement rows to two's complement, and
//  - the constant term: each row's sign bit is stored inverted and -2^msb of
//    every row is collected into one constant, so no row needs sign extension.
// The sign factors sit at weights <= 2^(N-2) and the constant has no bit
// below 2^(N+K-2), so the two never overlap and share one row.
// The stage order (hybrid encoding, partial product generation, Wallace
// accumulation, prefix final addition), the digit sets and the generator
// form follow the published scheme; the rounding tie rule, the row layout of the
// correction term and the Kogge-Stone adder are this design's choices.
//
// Interface: a and b in, p out, all two's complement; purely combinational
// (no clock, result valid after the combinational delay).
module rad2k_multiplier
  import rad2k_pkg::*;
#(
  parameter int N = 16,  // operand width (even)
  parameter int K = 8    // LSBs of b in the approximate radix-2^K digit (even, 4 <= K <= N-2)
) (
  input  logic [N-1:0]   a,  // multiplicand
  input  logic [N-1:0]   b,  // multiplier (hybrid encoded)
  output logic [2*N-1:0] p   // approximate product
);
  localparam int W    = 2 * N;
  localparam int NR4  = (N - K) / 2;  // radix-4 rows
  localparam int ROWS = NR4 + 2;      // + high-radix row + correction row

  // Constant term: minus the weight of every row's (inverted) sign bit.
  function automatic logic [W-1:0] const_term();
    logic [W-1:0] c = '0;
    c = c - (W'(1) << (N + K - 2));            // high-radix row, sign at N+2 above 2^(K-4)
    for (int j = K / 2; j < N / 2; j++)
      c = c - (W'(1) << (2 * j + N));          // radix-4 row j, sign at bit N above 2^(2j)
    return c;
  endfunction
  localparam logic [W-1:0] CONST = const_term();

  // ---- high-radix digit -------------------------------------------------
  hr_sel_t      hr_sel;
  logic [N+2:0] hr_pp;

  hr_encoder #(.K(K)) u_hr_enc (.bits(b[K-1:0]), .sel(hr_sel));
  hr_ppg     #(.N(N)) u_hr_ppg (.a(a), .sel(hr_sel), .pp(hr_pp));

  // ---- radix-4 digits ---------------------------------------------------
  r4_sel_t    r4_sel [NR4];
  logic [N:0] r4_pp  [NR4];

  for (genvar r = 0; r < NR4; r++) begin : g_r4
    localparam int J = K / 2 + r;  // digit index, weight 4^J
    radix4_encoder u_enc (.bits(b[2*J+1:2*J-1]), .sel(r4_sel[r]));
    radix4_ppg #(.N(N)) u_ppg (.a(a), .sel(r4_sel[r]), .pp(r4_pp[r]));
  end

  // ---- partial product rows ---------------------------------------------
  logic [W-1:0] rows [ROWS];
  logic [W-1:0] sign_factors;

  always_comb begin
    rows[0] = W'({~hr_pp[N+2], hr_pp[N+1:0]}) << (K - 4);
    sign_factors = W'(hr_sel.neg) << (K - 4);
    for (int r = 0; r < NR4; r++) begin
      rows[r+1] = W'({~r4_pp[r][N], r4_pp[r][N-1:0]}) << (K + 2 * r);
      sign_factors = sign_factors | (W'(r4_sel[r].neg) << (K + 2 * r));
    end
    rows[ROWS-1] = CONST | sign_factors;
  end

  // ---- accumulation and final addition ----------------------------------
  logic [W-1:0] acc_sum, acc_carry;

  wallace_tree #(.ROWS(ROWS), .W(W)) u_tree (
    .rows   (rows),
    .sum_o  (acc_sum),
    .carry_o(acc_carry)
  );

  prefix_adder #(.W(W)) u_add (.x(acc_sum), .y(acc_carry), .s(p));

  if (N % 2 != 0 || K % 2 != 0 || K < 4 || K > N - 2) begin : g_bad_params
    $error("rad2k_multiplier: need even N and K with 4 <= K <= N-2");
  end
endmodule
