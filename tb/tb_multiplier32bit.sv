// tb_multiplier32bit: self-check of the slice-array multiplier against the
// integer product. The default 32-bit instance gets the published example
// 0xE507E03F * 0xAEA007F9 = 0x9C3A8678F52AD647, the extreme operands and
// random pairs (some with all-ones slices, which drive the column sums to
// their largest values). 8-bit (9-bit adders) and 16-bit (10-bit adders)
// instances are checked exhaustively and randomly.
module tb_multiplier32bit;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  multiplier32bit dut32 (.A(a32), .B(b32), .P(p32));
  multiplier32bit #(.WIDTH(16), .KS_W(10)) dut16 (.A(a16), .B(b16), .P(p16));
  multiplier32bit #(.WIDTH(8),  .KS_W(9))  dut8  (.A(a8),  .B(b8),  .P(p8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] x, logic [31:0] y);
    logic [63:0] want = 64'(x) * 64'(y);
    a32 = x; b32 = y;
    #1;
    checks++;
    if (p32 != want) begin
      failures++;
      $display("FAIL 32b %h * %h -> %h, want %h", x, y, p32, want);
    end
  endtask

  function automatic logic [31:0] rand_word();
    logic [31:0] w = $urandom;
    // sometimes force whole slices to 4'hF to stress the column sums
    for (int s = 0; s < 8; s++)
      if ($urandom_range(3) == 0) w[4*s +: 4] = 4'hF;
    return w;
  endfunction

  initial begin
    check32(32'hE507E03F, 32'hAEA007F9);
    check32(32'hFFFFFFFF, 32'hFFFFFFFF);
    check32(32'h0, 32'hFFFFFFFF);
    check32(32'h1, 32'hFFFFFFFF);
    check32(32'h80000000, 32'h80000000);
    for (int n = 0; n < 20000; n++) check32(rand_word(), rand_word());

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (p8 != 16'(x * y)) begin
          failures++;
          $display("FAIL 8b %0d * %0d -> %0d", x, y, p8);
        end
      end

    a16 = 16'hFFFF; b16 = 16'hFFFF;
    #1;
    checks++;
    if (p16 != 32'hFFFE0001) begin
      failures++;
      $display("FAIL 16b ffff*ffff -> %h", p16);
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      checks++;
      if (p16 != 32'(a16) * 32'(b16)) begin
        failures++;
        $display("FAIL 16b %h * %h -> %h", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
