// tb_hr_ppg: high-radix partial product row generator, N = 16.
// For corner and random multiplicands, both signs and each of the five
// magnitudes (0, 1, 2, 4, 8 in units of the row's weight 2^(k-4)), the row
// read as an (N+3)-bit two's complement number plus the sign factor must
// equal the signed multiple of a.
module tb_hr_ppg;
  import rad2k_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0] a;
  hr_sel_t      sel;
  logic [N+2:0] pp;

  hr_ppg #(.N(N)) dut (.a(a), .sel(sel), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] aa);
    for (int ng = 0; ng < 2; ng++)
      for (int m = 0; m < 5; m++) begin
        longint got, expv, mag;
        a = aa;
        sel.neg = ng[0];
        sel.x = (m == 0) ? 4'b0000 : 4'(1 << (m - 1));
        mag = (m == 0) ? 0 : (longint'(1) << (m - 1));
        #1;
        got  = longint'($signed(pp)) + longint'(sel.neg);
        expv = (ng != 0 ? -mag : mag) * longint'($signed(aa));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("MISMATCH a=%0d neg=%0d mag=%0d got=%0d", $signed(aa), ng, mag, got);
        end
      end
  endtask

  initial begin : main
    check('0); check(16'h0001); check(16'hFFFF); check(16'h7FFF); check(16'h8000);
    for (int t = 0; t < 2000; t++) check(16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
