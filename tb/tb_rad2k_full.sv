// tb_rad2k_full: the multiplier at its default size (16 x 16, K = 8, RAD256),
// no parameter overrides. For 256 multiplicands (corners and random) every
// one of the 65536 multiplier values is applied, and each product is compared
// with a * (b - y0 + round(y0)), where y0 is the signed value of b[7:0] and
// round() picks the nearest of 0, +-16, +-32, +-64, +-128 (ties to the larger
// magnitude). It also checks that the product is exact whenever y0 is already
// one of those values, and that the error never exceeds |a| * 32 (half the
// widest gap between candidates).
module tb_rad2k_full;
  localparam int N = 16;
  localparam int K = 8;
  int checks = 0, failures = 0, exact_cases = 0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  rad2k_multiplier dut (.a(a), .b(b), .p(p));

  function automatic longint rounded(longint y);
    longint best = 0;
    longint bestd = (y < 0) ? -y : y;
    for (int s = K - 4; s < K; s++)
      for (int sg = -1; sg <= 1; sg += 2) begin
        longint c = sg * (longint'(1) << s);
        longint d = (y > c) ? y - c : c - y;
        if (d < bestd || (d == bestd && (longint'(1) << s) > ((best < 0) ? -best : best))) begin
          best = c;
          bestd = d;
        end
      end
    return best;
  endfunction

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int i = 0; i < 256; i++) begin
      logic [N-1:0] aa;
      case (i)
        0: aa = 16'h0000;  1: aa = 16'h0001;  2: aa = 16'hFFFF;
        3: aa = 16'h7FFF;  4: aa = 16'h8000;  5: aa = 16'h8001;
        default: aa = 16'($urandom());
      endcase
      for (int bb = 0; bb < (1 << N); bb++) begin
        longint y0, ry, expv, got, err, sa;
        a = aa;
        b = bb[N-1:0];
        #1;
        y0   = longint'($signed(b[K-1:0]));
        ry   = rounded(y0);
        sa   = longint'($signed(aa));
        expv = sa * (longint'($signed(b)) - y0 + ry);
        got  = longint'($signed(p));
        err  = got - sa * longint'($signed(b));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("MISMATCH a=%0d b=%0d got=%0d exp=%0d", sa, $signed(b), got, expv);
        end
        if (ry == y0) begin
          exact_cases++;
          checks++;
          if (err != 0) failures++;
        end
        checks++;
        if (((err < 0) ? -err : err) > ((sa < 0) ? -sa : sa) * 32) failures++;
      end
    end
    $display("exact-digit cases: %0d", exact_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
