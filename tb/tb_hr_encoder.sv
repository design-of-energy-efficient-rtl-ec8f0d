// tb_hr_encoder: exhaustive test of the approximate radix-2^k encoder for
// K = 6, 8, 10, 12 (RAD64 .. RAD4096). For every value of the K LSBs the
// nearest candidate in {0, +-2^(K-4) .. +-2^(K-1)} (ties to the larger
// magnitude) is found by search and compared with the digit the select
// signals stand for. At most one select may be set, and neg must be the
// digit's sign.
module tb_hr_encoder;
  import rad2k_pkg::*;
  int checks = 0, failures = 0;
  logic [11:0] bits;
  hr_sel_t     sel [4];
  localparam int KS [4] = '{6, 8, 10, 12};

  hr_encoder #(.K(6))  u6  (.bits(bits[5:0]),  .sel(sel[0]));
  hr_encoder #(.K(8))  u8  (.bits(bits[7:0]),  .sel(sel[1]));
  hr_encoder #(.K(10)) u10 (.bits(bits[9:0]),  .sel(sel[2]));
  hr_encoder #(.K(12)) u12 (.bits(bits[11:0]), .sel(sel[3]));

  function automatic int nearest(int y, int k);
    int best = 0;
    int bestd = (y < 0) ? -y : y;
    for (int s = k - 4; s < k; s++)
      for (int sg = -1; sg <= 1; sg += 2) begin
        int c = sg * (1 << s);
        int dd = (y > c) ? y - c : c - y;
        if (dd < bestd || (dd == bestd && (1 << s) > ((best < 0) ? -best : best))) begin
          best = c;
          bestd = dd;
        end
      end
    return best;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int t = 0; t < 4096; t++) begin
      bits = t[11:0];
      #1;
      for (int v = 0; v < 4; v++) begin
        automatic int k = KS[v];
        automatic int y = 0;
        automatic int mag = 0;
        int got, expv;
        for (int i = 0; i < k - 1; i++) if (bits[i]) y += 1 << i;
        if (bits[k-1]) y -= 1 << (k - 1);
        for (int i = 0; i < 4; i++) if (sel[v].x[i]) mag += 1 << (k - 4 + i);
        got  = sel[v].neg ? -mag : mag;
        expv = nearest(y, k);
        checks++;
        if (got != expv || !$onehot0(sel[v].x) || (expv != 0 && sel[v].neg != (expv < 0))) begin
          failures++;
          if (failures < 10) $display("MISMATCH K=%0d y0=%0d got=%0d exp=%0d", k, y, got, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
