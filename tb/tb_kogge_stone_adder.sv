// tb_kogge_stone_adder: self-check of the Kogge-Stone adder at the default
// 11-bit width (exhaustive over a, b and carry-in for a = b corner values and
// random otherwise) and at 8 bits (exhaustive), against {cout, sum} = a + b + cin.
module tb_kogge_stone_adder;
  logic [10:0] a11, b11, s11;
  logic        c11, co11;
  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  int checks = 0, failures = 0;

  kogge_stone_adder dut11 (.a(a11), .b(b11), .cin(c11), .sum(s11), .cout(co11));
  kogge_stone_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check11(int x, int y, int c);
    a11 = 11'(x); b11 = 11'(y); c11 = 1'(c);
    #1;
    checks++;
    if ({co11, s11} != 12'(x + y + c)) begin
      failures++;
      $display("FAIL 11b %0d + %0d + %0d -> %0d", x, y, c, {co11, s11});
    end
  endtask

  initial begin
    // 8 bits: every a, b, cin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} != 9'(x + y + c)) begin
            failures++;
            $display("FAIL 8b %0d + %0d + %0d -> %0d", x, y, c, {co8, s8});
          end
        end
    // 11 bits: carry chains across the whole word, then random
    check11(2047, 1, 0);
    check11(2047, 0, 1);
    check11(2047, 2047, 1);
    check11(1024, 1024, 0);
    check11(1365, 682, 1);
    for (int n = 0; n < 20000; n++)
      check11(int'($urandom_range(2047)), int'($urandom_range(2047)), int'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
