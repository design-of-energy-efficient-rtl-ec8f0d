// tb_prefix_adder: parallel-prefix adder, exhaustive at W = 8 and with corner
// and random operands at W = 32 (the multiplier's width) and W = 17 (not a
// power of two). Every sum is compared with x + y modulo 2^W.
module tb_prefix_adder;
  int checks = 0, failures = 0;
  logic [7:0]  x8, y8, s8;
  logic [31:0] x32, y32, s32;
  logic [16:0] x17, y17, s17;

  prefix_adder #(.W(8))  u8  (.x(x8),  .y(y8),  .s(s8));
  prefix_adder #(.W(32)) u32 (.x(x32), .y(y32), .s(s32));
  prefix_adder #(.W(17)) u17 (.x(x17), .y(y17), .s(s17));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks += 3;
    if (s8  != 8'(x8 + y8))    begin failures++; $display("MISMATCH W=8 %h+%h=%h", x8, y8, s8); end
    if (s32 != 32'(x32 + y32)) begin failures++; $display("MISMATCH W=32 %h+%h=%h", x32, y32, s32); end
    if (s17 != 17'(x17 + y17)) begin failures++; $display("MISMATCH W=17 %h+%h=%h", x17, y17, s17); end
  endtask

  initial begin : main
    x32 = '1; y32 = 32'd1; x17 = '1; y17 = 17'd1; x8 = '0; y8 = '0;
    check();
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x8 = i[7:0]; y8 = j[7:0];
        x32 = $urandom(); y32 = $urandom();
        if (j % 4 == 0) y32 = ~x32;             // full carry chain (propagate everywhere)
        if (j % 4 == 1) y32 = ~x32 + 32'd1;     // sum wraps to zero
        x17 = 17'($urandom()); y17 = 17'($urandom());
        check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
