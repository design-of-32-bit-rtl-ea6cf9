// bitslice_mult32: slice-serial 32 x 32 -> 64 bit unsigned multiplier, the
// top of the design. The operands arrive as eight pairs of 4-bit slices
// (a_k, b_k), least significant pair first, and the 64-bit product leaves as
// sixteen 4-bit slices P_0 .. P_15, least significant first.
//
// How it works: accepted slices are written into operand registers A and B
// (slice 0 of a new operation clears the rest). The combinational slice-array
// multiplier (multiplier32bit: 4x4 Wallace multipliers plus Kogge-Stone
// column adders) always multiplies the registers. Product slice P_k depends
// only on operand slices 0..k, so P_k is correct as soon as slice pair k is
// in the registers, even though the higher slices are still zero. P_k is
// therefore output in the cycle after pair k is accepted; after the last pair
// the remaining slices P_S .. P_2S-1 follow on consecutive cycles (drain).
//
// Interface (valid/ready, all on the rising edge of clk, rst_n active-low and
// synchronous):
//   in_valid/in_ready  a slice pair is taken on a cycle where both are high;
//                      in_ready is high while a multiplication is loading and
//                      low during the drain, so gaps between input pairs are
//                      allowed and delay the matching output slices.
//   out_valid, p_slice, p_index, out_last
//                      one product slice per cycle with out_valid; p_index is
//                      its position k, out_last marks P_2S-1.
// Timing: with no gaps, P_0 follows a_0/b_0 by one cycle and P_15 follows it
// by sixteen; a new operation may start in the cycle that shows P_15.
//
// The slice sizes, slice counts and the least-significant-first order in
// and out follow the design description; the handshake, the registers, the
// reset and the output timing are this implementation's choices.
module bitslice_mult32
  import bitslice_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned KS_W  = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [SLICE_W-1:0]            a_slice,
  input  logic [SLICE_W-1:0]            b_slice,
  output logic                          out_valid,
  output logic [SLICE_W-1:0]            p_slice,
  output logic [$clog2(2*WIDTH/SLICE_W)-1:0] p_index,
  output logic                          out_last
);
  localparam int unsigned S    = WIDTH / SLICE_W;  // operand slices
  localparam int unsigned NOUT = 2 * S;            // product slices
  localparam int unsigned IW   = $clog2(NOUT);

  typedef enum logic {LOAD, DRAIN} phase_t;

  phase_t                   phase;
  logic [IW-1:0]            load_cnt;   // index of the next operand slice
  logic [IW-1:0]            out_idx;
  logic [S-1:0][SLICE_W-1:0] a_reg, b_reg;
  logic [2*WIDTH-1:0]       product;

  assign in_ready = (phase == LOAD);
  wire accept = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= LOAD;
      load_cnt  <= '0;
      out_idx   <= '0;
      out_valid <= 1'b0;
      a_reg     <= '0;
      b_reg     <= '0;
    end else begin
      unique case (phase)
        LOAD: begin
          out_valid <= accept;
          if (accept) begin
            if (load_cnt == '0) begin
              a_reg <= '0;
              b_reg <= '0;
            end
            a_reg[load_cnt[$clog2(S)-1:0]] <= a_slice;
            b_reg[load_cnt[$clog2(S)-1:0]] <= b_slice;
            out_idx <= load_cnt;
            if (load_cnt == IW'(S - 1)) begin
              load_cnt <= '0;
              phase    <= DRAIN;
            end else begin
              load_cnt <= load_cnt + 1'b1;
            end
          end
        end
        DRAIN: begin
          out_valid <= 1'b1;
          out_idx   <= out_idx + 1'b1;
          if (out_idx == IW'(NOUT - 2)) phase <= LOAD;
        end
        default: phase <= LOAD;
      endcase
    end
  end

  multiplier32bit #(.WIDTH(WIDTH), .KS_W(KS_W)) u_array (
    .A(a_reg),
    .B(b_reg),
    .P(product)
  );

  assign p_slice  = product[SLICE_W*out_idx +: SLICE_W];
  assign p_index  = out_idx;
  assign out_last = out_valid && (out_idx == IW'(NOUT - 1));

  // the drain never pauses: every drain cycle is followed by an output slice
  a_drain_outputs: assert property (@(posedge clk) disable iff (!rst_n)
    phase == DRAIN |=> out_valid);
  // output slices of one operation come in order
  a_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_last ##1 out_valid |-> p_index == $past(p_index) + 1'b1);
endmodule
