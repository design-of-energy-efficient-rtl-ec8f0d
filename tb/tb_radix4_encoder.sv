// tb_radix4_encoder: exhaustive test of the radix-4 digit encoder.
// For all eight triplets {b[2j+1], b[2j], b[2j-1]} the digit
// -2*b[2j+1] + b[2j] + b[2j-1] is worked out here and compared with the
// signed digit the select signals stand for; x1 and x2 must never both be set,
// and a nonzero digit must carry the right sign.
module tb_radix4_encoder;
  import rad2k_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] bits;
  r4_sel_t    sel;

  radix4_encoder dut (.bits(bits), .sel(sel));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int t = 0; t < 8; t++) begin
      int y, mag, got;
      bits = t[2:0];
      #1;
      y   = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      mag = sel.x2 ? 2 : (sel.x1 ? 1 : 0);
      got = sel.neg ? -mag : mag;
      checks++;
      if (got != y || (sel.x1 && sel.x2) || (y != 0 && sel.neg != (y < 0))) begin
        failures++;
        $display("MISMATCH bits=%b digit=%0d sel=%p", bits, y, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
