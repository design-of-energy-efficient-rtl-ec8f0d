// tb_wallace_tree: carry-save reduction tree, W = 32, with 2, 3, 4, 6, 7 and
// 9 input rows (1, 2, 3 and 4 layers). For random and all-ones rows the two
// outputs must add up to the sum of the inputs modulo 2^32.
module tb_wallace_tree;
  localparam int W = 32;
  int checks = 0, failures = 0;
  logic [W-1:0] rin [9];
  logic [W-1:0] s [6], c [6];
  localparam int RS [6] = '{2, 3, 4, 6, 7, 9};

  wallace_tree #(.ROWS(2), .W(W)) u2 (.rows(rin[0:1]), .sum_o(s[0]), .carry_o(c[0]));
  wallace_tree #(.ROWS(3), .W(W)) u3 (.rows(rin[0:2]), .sum_o(s[1]), .carry_o(c[1]));
  wallace_tree #(.ROWS(4), .W(W)) u4 (.rows(rin[0:3]), .sum_o(s[2]), .carry_o(c[2]));
  wallace_tree #(.ROWS(6), .W(W)) u6 (.rows(rin[0:5]), .sum_o(s[3]), .carry_o(c[3]));
  wallace_tree #(.ROWS(7), .W(W)) u7 (.rows(rin[0:6]), .sum_o(s[4]), .carry_o(c[4]));
  wallace_tree #(.ROWS(9), .W(W)) u9 (.rows(rin),      .sum_o(s[5]), .carry_o(c[5]));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int v = 0; v < 6; v++) begin
      logic [W-1:0] expv = '0;
      for (int r = 0; r < RS[v]; r++) expv += rin[r];
      checks++;
      if (W'(s[v] + c[v]) != expv) begin
        failures++;
        if (failures < 10) $display("MISMATCH rows=%0d got=%h exp=%h", RS[v], s[v] + c[v], expv);
      end
    end
  endtask

  initial begin : main
    foreach (rin[r]) rin[r] = '1;
    check();
    for (int t = 0; t < 5000; t++) begin
      foreach (rin[r]) rin[r] = $urandom();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
