// tb_bitslice_mult32: end-to-end self-check of the slice-serial 32 x 32
// multiplier at its default parameters. Operations are fed as eight slice
// pairs, least significant first; every product slice that comes out is
// compared with the matching nibble of the integer product.
//
// Besides values it checks timing: each product slice P_k (k < 8) appears in
// the cycle after operand pair k was taken, and an operation fed without gaps
// shows P_15 sixteen cycles after its first pair. It makes each mechanism of
// the interface happen and counts it: gaps in the input stream, input held
// off by in_ready during the drain, and a new operation starting in the cycle
// that shows P_15 (back to back). A mechanism that never happened counts as
// a failure. Operands include the published example 0xE507E03F * 0xAEA007F9.
module tb_bitslice_mult32;
  localparam int NOPS = 300;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid, in_ready;
  logic [3:0] a_slice, b_slice;
  logic       out_valid, out_last;
  logic [3:0] p_slice;
  logic [3:0] p_index;

  int checks = 0, failures = 0;
  int n_gaps = 0, n_holdoff = 0, n_back_to_back = 0, n_done = 0;

  bitslice_mult32 dut (
    .clk, .rst_n, .in_valid, .in_ready, .a_slice, .b_slice,
    .out_valid, .p_slice, .p_index, .out_last
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] op_a [NOPS];
  logic [31:0] op_b [NOPS];
  bit          op_gaps [NOPS];   // operation fed with input gaps

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ---------------------------------------------------------------- driver
  initial begin
    op_a[0] = 32'hE507E03F; op_b[0] = 32'hAEA007F9;
    op_a[1] = 32'hFFFFFFFF; op_b[1] = 32'hFFFFFFFF;
    op_a[2] = 32'h00000000; op_b[2] = 32'h12345678;
    op_a[3] = 32'hFFFFFFFF; op_b[3] = 32'h00000001;
    for (int n = 4; n < NOPS; n++) begin
      op_a[n] = $urandom;
      op_b[n] = $urandom;
      if (n % 5 == 0) op_a[n] |= 32'hF0F0F0F0;
    end
    for (int n = 0; n < NOPS; n++) op_gaps[n] = (n % 3 == 2);

    rst_n    = 1'b0;
    in_valid = 1'b0;
    a_slice  = '0;
    b_slice  = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < NOPS; n++) begin
      for (int k = 0; k < 8; k++) begin
        if (op_gaps[n] && $urandom_range(1) == 1) begin
          @(negedge clk) in_valid = 1'b0;
          repeat ($urandom_range(3)) @(negedge clk);
          n_gaps++;
        end
        @(negedge clk);
        in_valid = 1'b1;
        a_slice  = op_a[n][4*k +: 4];
        b_slice  = op_b[n][4*k +: 4];
        // hold the pair until it is taken
        while (!in_ready) begin
          @(posedge clk);
          n_holdoff++;
          @(negedge clk);
        end
      end
      // operation 7 of every 8 pauses, so the stream also starts from idle
      if (n % 8 == 7) begin
        @(negedge clk) in_valid = 1'b0;
        repeat (20) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 1'b0;
  end

  // --------------------------------------------------------------- monitor
  int     in_op = 0, in_k = 0;        // next pair to be taken
  int     out_op = 0, out_k = 0;      // next product slice expected
  int     cycle = 0;
  int     start_cycle [NOPS];
  bit     taken_last;                 // a pair was taken at the previous edge
  int     taken_k;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      // output side
      if (taken_last && taken_k < 8 && !(out_valid && p_index == 4'(taken_k)))
        fail($sformatf("P_%0d not shown in the cycle after its operand pair", taken_k));
      if (out_valid) begin
        logic [63:0] want;
        want = 64'(op_a[out_op]) * 64'(op_b[out_op]);
        checks++;
        if (p_index != 4'(out_k))
          fail($sformatf("op %0d: p_index %0d, expected %0d", out_op, p_index, out_k));
        else if (p_slice != want[4*out_k +: 4])
          fail($sformatf("op %0d: P_%0d = %h, expected %h", out_op, out_k, p_slice,
                         want[4*out_k +: 4]));
        if (out_last != (out_k == 15))
          fail($sformatf("op %0d: out_last wrong at slice %0d", out_op, out_k));
        if (out_k == 15) begin
          checks++;
          if (!op_gaps[out_op] && cycle - start_cycle[out_op] != 16)
            fail($sformatf("op %0d: P_15 after %0d cycles, expected 16", out_op,
                           cycle - start_cycle[out_op]));
          n_done++;
          out_k = 0;
          out_op++;
        end else begin
          out_k++;
        end
      end
      // input side
      taken_last = in_valid && in_ready;
      taken_k    = in_k;
      if (in_valid && in_ready) begin
        if (in_k == 0) start_cycle[in_op] = cycle;
        if (in_k == 0 && out_last) n_back_to_back++;
        if (in_k == 7) begin
          in_k = 0;
          in_op++;
        end else begin
          in_k++;
        end
      end
      if (n_done == NOPS) begin
        if (n_gaps == 0)         fail("no input gap happened");
        if (n_holdoff == 0)      fail("input was never held off during a drain");
        if (n_back_to_back == 0) fail("no back-to-back operation happened");
        $display("operations=%0d input_gaps=%0d drain_holdoffs=%0d back_to_back=%0d",
                 n_done, n_gaps, n_holdoff, n_back_to_back);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end else begin
      taken_last = 1'b0;
    end
  end
endmodule
