// slice_serial_checker: test helper that owns one bitslice_mult32 instance of
// the given size, feeds it NOPS random operations as back-to-back slice pairs
// (least significant first, no gaps) and checks every product slice against
// the integer product, plus the 2*WIDTH/4-cycle latency from the first
// operand pair to the last product slice. Reports through done/checks/failures.
module slice_serial_checker #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned KS_W  = 9,
  parameter int unsigned NOPS  = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned S  = WIDTH / 4;
  localparam int unsigned IW = $clog2(2 * S);

  logic          in_valid, in_ready, out_valid, out_last;
  logic [3:0]    a_slice, b_slice, p_slice;
  logic [IW-1:0] p_index;

  bitslice_mult32 #(.WIDTH(WIDTH), .KS_W(KS_W)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .a_slice, .b_slice,
    .out_valid, .p_slice, .p_index, .out_last
  );

  logic [WIDTH-1:0] op_a [NOPS];
  logic [WIDTH-1:0] op_b [NOPS];

  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    for (int n = 0; n < NOPS; n++) begin
      op_a[n] = WIDTH'($urandom);
      op_b[n] = WIDTH'($urandom);
    end
    op_a[0] = '1;
    op_b[0] = '1;
    in_valid = 1'b0;
    a_slice  = '0;
    b_slice  = '0;
    @(posedge rst_n);
    for (int n = 0; n < NOPS; n++)
      for (int k = 0; k < S; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        a_slice  = op_a[n][4*k +: 4];
        b_slice  = op_b[n][4*k +: 4];
        while (!in_ready) begin
          @(posedge clk);
          @(negedge clk);
        end
      end
    @(negedge clk) in_valid = 1'b0;
  end

  int cycle = 0, out_op = 0, out_k = 0, in_k = 0;
  int start_cycle;

  always @(posedge clk) begin
    cycle++;
    if (rst_n && !done) begin
      if (out_valid) begin
        logic [2*WIDTH-1:0] want;
        want = (2*WIDTH)'(op_a[out_op]) * (2*WIDTH)'(op_b[out_op]);
        checks++;
        if (p_index != IW'(out_k) || p_slice != want[4*out_k +: 4]) begin
          failures++;
          $display("FAIL %0d-bit op %0d: P_%0d = %h (index %0d), expected %h",
                   WIDTH, out_op, out_k, p_slice, p_index, want[4*out_k +: 4]);
        end
        if (out_k == 2 * S - 1) begin
          checks++;
          if (cycle - start_cycle != 2 * S) begin
            failures++;
            $display("FAIL %0d-bit op %0d: latency %0d, expected %0d", WIDTH, out_op,
                     cycle - start_cycle, 2 * S);
          end
          out_k = 0;
          out_op++;
          if (out_op == NOPS) done <= 1'b1;
        end else begin
          out_k++;
        end
      end
      if (in_valid && in_ready) begin
        if (in_k == 0) start_cycle = cycle;
        in_k = (in_k == S - 1) ? 0 : in_k + 1;
      end
    end
  end
endmodule
