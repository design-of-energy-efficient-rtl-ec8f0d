// tb_radix4_ppg: radix-4 partial product row generator, N = 16.
// For corner and random multiplicands and every select combination
// (digits 0, +-1, +-2, and the neg-with-zero-magnitude case), the row read as
// an (N+1)-bit two's complement number plus the sign factor neg must equal
// digit * a.
module tb_radix4_ppg;
  import rad2k_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0] a;
  r4_sel_t      sel;
  logic [N:0]   pp;

  radix4_ppg #(.N(N)) dut (.a(a), .sel(sel), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] aa);
    r4_sel_t s [6];
    int      d [6];
    s = '{'{1'b0,1'b0,1'b0}, '{1'b0,1'b1,1'b0}, '{1'b0,1'b0,1'b1},
          '{1'b1,1'b1,1'b0}, '{1'b1,1'b0,1'b1}, '{1'b1,1'b0,1'b0}};
    d = '{0, 1, 2, -1, -2, 0};
    for (int i = 0; i < 6; i++) begin
      longint got, expv;
      a = aa;
      sel = s[i];
      #1;
      got  = longint'($signed(pp)) + longint'(sel.neg);
      expv = longint'(d[i]) * longint'($signed(aa));
      checks++;
      if (got != expv) begin
        failures++;
        if (failures < 10) $display("MISMATCH a=%0d digit=%0d got=%0d", $signed(aa), d[i], got);
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
