// tb_rad2k_multiplier: end-to-end test of the hybrid high-radix multiplier
// for the four radix-2^k variants of a 16-bit multiplier: K = 6, 8, 10, 12
// (RAD64, RAD256, RAD1024, RAD4096).
//
// The reference is computed without the design's datapath: y0 is the signed
// value of b[K-1:0], its approximation is the candidate in
// {0, +-2^(K-4) .. +-2^(K-1)} nearest to it (ties to the larger magnitude),
// and the expected product is a * (b - y0 + approx). Stimulus: directed
// corners, every b for a set of multiplicands, then random pairs. It also
// counts the mechanisms of the encoding (each high-radix shift select, a
// nonzero digit rounded to zero, negative digits, tie rounding, exact
// digits, each radix-4 digit kind) and fails if one never occurs, and prints
// the mean relative error distance (MRED) and mean error of each variant.
module tb_rad2k_multiplier;
  localparam int N = 16;
  localparam int NV = 4;
  localparam int KS [NV] = '{6, 8, 10, 12};

  int checks = 0, failures = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p [NV];

  rad2k_multiplier #(.N(N), .K(6))  u_k6  (.a(a), .b(b), .p(p[0]));
  rad2k_multiplier #(.N(N), .K(8))  u_k8  (.a(a), .b(b), .p(p[1]));
  rad2k_multiplier #(.N(N), .K(10)) u_k10 (.a(a), .b(b), .p(p[2]));
  rad2k_multiplier #(.N(N), .K(12)) u_k12 (.a(a), .b(b), .p(p[3]));

  // nearest candidate, ties to the larger magnitude
  function automatic longint approx_digit(longint y, int k);
    longint best = 0;
    longint bestd = (y < 0) ? -y : y;
    for (int s = k - 4; s <= k - 1; s++) begin
      for (int sg = -1; sg <= 1; sg += 2) begin
        longint c = sg * (longint'(1) << s);
        longint d = (y - c < 0) ? c - y : y - c;
        if (d < bestd || (d == bestd && ((c < 0) ? -c : c) > ((best < 0) ? -best : best))) begin
          best = c;
          bestd = d;
        end
      end
    end
    return best;
  endfunction

  function automatic longint low_digit(logic [N-1:0] bb, int k);
    longint y = 0;
    for (int i = 0; i < k - 1; i++) if (bb[i]) y += longint'(1) << i;
    if (bb[k-1]) y -= longint'(1) << (k - 1);
    return y;
  endfunction

  function automatic longint ref_product(logic [N-1:0] aa, logic [N-1:0] bb, int k);
    longint y0 = low_digit(bb, k);
    return longint'($signed(aa)) * (longint'($signed(bb)) - y0 + approx_digit(y0, k));
  endfunction

  // mechanism counters
  int cnt_sel [NV][4];
  int cnt_round_zero [NV], cnt_neg_hr [NV], cnt_tie [NV], cnt_exact [NV];
  int cnt_r4_zero, cnt_r4_one, cnt_r4_two, cnt_r4_neg;
  real red_sum [NV], err_sum [NV];
  int  red_n [NV];

  // Mechanisms are counted from the operands (the digits the encoders must
  // produce); the product checks then confirm the design handled each case.
  task automatic count_hr(int v);
    longint y0 = low_digit(b, KS[v]);
    longint ay = (y0 < 0) ? -y0 : y0;
    longint r  = approx_digit(y0, KS[v]);
    longint ar = (r < 0) ? -r : r;
    for (int i = 0; i < 4; i++) if (ar == (longint'(1) << (KS[v] - 4 + i))) cnt_sel[v][i]++;
    if (y0 != 0 && r == 0) cnt_round_zero[v]++;
    if (r < 0) cnt_neg_hr[v]++;
    if (r == y0) cnt_exact[v]++;
    for (int s = KS[v] - 5; s <= KS[v] - 2; s++)
      if (s >= 0 && ay == ((s == KS[v] - 5) ? (longint'(1) << s) : 3 * (longint'(1) << s)))
        cnt_tie[v]++;
  endtask

  task automatic apply(logic [N-1:0] aa, logic [N-1:0] bb, bit stats);
    a = aa;
    b = bb;
    #1;
    for (int v = 0; v < NV; v++) count_hr(v);
    for (int j = 3; j < N / 2; j++) begin  // radix-4 digits of the K = 6 variant
      int y = -2 * int'(bb[2*j+1]) + int'(bb[2*j]) + int'(bb[2*j-1]);
      if (y == 0) cnt_r4_zero++;
      if (y == 1 || y == -1) cnt_r4_one++;
      if (y == 2 || y == -2) cnt_r4_two++;
      if (y < 0) cnt_r4_neg++;
    end
    for (int v = 0; v < NV; v++) begin
      longint exp_p = ref_product(aa, bb, KS[v]);
      longint acc   = longint'($signed(aa)) * longint'($signed(bb));
      checks++;
      if (longint'($signed(p[v])) != exp_p) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH K=%0d a=%0d b=%0d got=%0d exp=%0d", KS[v],
                   $signed(aa), $signed(bb), $signed(p[v]), exp_p);
      end
      if (stats && acc != 0) begin
        real e = real'(acc - longint'($signed(p[v])));
        red_sum[v] += ((e < 0) ? -e : e) / ((acc < 0) ? -real'(acc) : real'(acc));
        err_sum[v] += e;
        red_n[v]++;
      end
    end
  endtask

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [N-1:0] avals [8];
    avals = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h1234, 16'hB6D5, 16'h5A5A};
    // directed corners
    foreach (avals[i]) foreach (avals[j]) apply(avals[i], avals[j], 0);
    // every multiplier value for a few multiplicands
    for (int i = 0; i < 4; i++)
      for (int bb = 0; bb < (1 << N); bb++) apply(avals[i+3], bb[N-1:0], 0);
    // random operands, also used for the error statistics
    for (int t = 0; t < 200000; t++) apply(16'($urandom()), 16'($urandom()), 1);

    for (int v = 0; v < NV; v++) begin
      $display("RAD%0d: MRED = %e  mean error = %e  (random operands: %0d)",
               1 << KS[v], red_sum[v] / red_n[v], err_sum[v] / red_n[v], red_n[v]);
      for (int i = 0; i < 4; i++) begin
        $display("  K=%0d select x%0d used %0d times", KS[v], 1 << (KS[v] - 4 + i), cnt_sel[v][i]);
        if (cnt_sel[v][i] == 0) failures++;
      end
      $display("  K=%0d: rounded to zero %0d, negative digit %0d, tie %0d, exact %0d",
               KS[v], cnt_round_zero[v], cnt_neg_hr[v], cnt_tie[v], cnt_exact[v]);
      if (cnt_round_zero[v] == 0 || cnt_neg_hr[v] == 0 || cnt_tie[v] == 0 || cnt_exact[v] == 0)
        failures++;
    end
    $display("radix-4 digits: zero %0d, |1| %0d, |2| %0d, negative %0d",
             cnt_r4_zero, cnt_r4_one, cnt_r4_two, cnt_r4_neg);
    if (cnt_r4_zero == 0 || cnt_r4_one == 0 || cnt_r4_two == 0 || cnt_r4_neg == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
