// tb_wallace4: exhaustive self-check of the 4x4 Wallace multiplier: all 256
// operand pairs against the integer product.
module tb_wallace4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  wallace4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        checks++;
        if (p != 8'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", x, y, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
