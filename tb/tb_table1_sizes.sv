// tb_table1_sizes: runs the slice-serial multiplier at the three multi-slice
// operand widths of the design's size comparison, 8, 16 and 32 bits (9-, 10-
// and 11-bit column adders), with random back-to-back operations, checking
// every product slice and the latency of 2*WIDTH/4 cycles. The 4-bit size is a
// single Wallace multiplier and is covered by tb_wallace4.
module tb_table1_sizes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done8, done16, done32;
  int   c8, c16, c32, f8, f16, f32;
  int   checks, failures;

  always #5 clk = ~clk;

  slice_serial_checker #(.WIDTH(8),  .KS_W(9),  .NOPS(400)) u8  (.clk, .rst_n, .done(done8),  .checks(c8),  .failures(f8));
  slice_serial_checker #(.WIDTH(16), .KS_W(10), .NOPS(300)) u16 (.clk, .rst_n, .done(done16), .checks(c16), .failures(f16));
  slice_serial_checker #(.WIDTH(32), .KS_W(11), .NOPS(200)) u32 (.clk, .rst_n, .done(done32), .checks(c32), .failures(f32));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done8 && done16 && done32);
    @(posedge clk);
    checks   = c8 + c16 + c32;
    failures = f8 + f16 + f32;
    $display("8-bit: %0d checks, 16-bit: %0d checks, 32-bit: %0d checks", c8, c16, c32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
