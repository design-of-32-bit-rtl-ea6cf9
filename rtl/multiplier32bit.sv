// multiplier32bit: unsigned WIDTH x WIDTH multiplier built from 4-bit slices
// (32 x 32 -> 64 by default). Purely combinational: A and B in, P out.
//
// A and B are cut into S = WIDTH/4 slices a_i, b_j. Every slice pair goes
// through its own 4x4 Wallace multiplier (S*S = 64 of them at 32 bits), giving
// an 8-bit partial product of weight 16^(i+j). Products of equal weight form
// column k = i+j (2S-1 columns). Each column is summed by a chain of
// KS_W-bit Kogge-Stone adders: the first adder adds the products with the two
// highest a-slice indices, each further adder brings in the next product
// (falling a-slice index), and the last adder adds the carry from the column
// below, which is that column's sum shifted right by 4. Column 0 is the single
// product a_0*b_0 and needs no adder. Product slice P_k is the low nibble of
// column k's sum; the top column's sum is at most 8 bits and gives the two top
// product slices. At 32 bits this uses 63 adders.
//
// Because column k only sees slices 0..k, the low product slices are ready
// as soon as the low operand slices are, which the slice-serial wrapper uses.
//
// The slice grid, the per-column adder chains, their order and the 11-bit
// adder width follow the design's block diagram of the 32-bit bit-slice
// multiplier; the adder for the carry into the top column is drawn only by
// ellipsis there and is included here. KS_W must hold the largest column sum
// (checked at elaboration).
module multiplier32bit
  import bitslice_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned KS_W  = 11
) (
  input  logic [WIDTH-1:0]   A,
  input  logic [WIDTH-1:0]   B,
  output logic [2*WIDTH-1:0] P
);
  localparam int unsigned S    = WIDTH / SLICE_W;  // slices per operand
  localparam int unsigned NCOL = 2 * S - 1;        // product columns

  if (WIDTH % SLICE_W != 0 || S < 2) begin : g_bad_width
    $error("multiplier32bit: WIDTH must be a multiple of 4, at least 8");
  end
  if (KS_W < col_sum_width(S) || KS_W < PP_W) begin : g_bad_ks_w
    $error("multiplier32bit: KS_W too narrow for the column sums");
  end

  // slice products
  logic [S-1:0][S-1:0][PP_W-1:0] pp;   // pp[i][j] = a_i * b_j
  for (genvar i = 0; i < S; i++) begin : g_row
    for (genvar j = 0; j < S; j++) begin : g_col
      wallace4 u_w (
        .a(A[SLICE_W*i +: SLICE_W]),
        .b(B[SLICE_W*j +: SLICE_W]),
        .p(pp[i][j])
      );
    end
  end

  // column sums; colsum[k] includes the carry from column k-1
  logic [NCOL-1:0][KS_W-1:0] colsum;

  assign colsum[0] = KS_W'(pp[0][0]);

  for (genvar k = 1; k < NCOL; k++) begin : g_column
    localparam int unsigned IHI = (k < S) ? k : S - 1;       // highest a index
    localparam int unsigned ILO = (k < S) ? 0 : k - (S - 1); // lowest a index
    localparam int unsigned N   = IHI - ILO + 1;             // products here

    // acc[0] = first product, acc[m] = acc[m-1] + next product,
    // acc[N] = acc[N-1] + carry from the column below
    logic [N:0][KS_W-1:0] acc;
    logic [N:1]           unused_cout;

    assign acc[0] = KS_W'(pp[IHI][k-IHI]);
    for (genvar m = 1; m < N; m++) begin : g_chain
      kogge_stone_adder #(.WIDTH(KS_W)) u_ks (
        .a   (acc[m-1]),
        .b   (KS_W'(pp[IHI-m][k-IHI+m])),
        .cin (1'b0),
        .sum (acc[m]),
        .cout(unused_cout[m])
      );
    end
    kogge_stone_adder #(.WIDTH(KS_W)) u_ks_carry (
      .a   (acc[N-1]),
      .b   (KS_W'(colsum[k-1] >> SLICE_W)),
      .cin (1'b0),
      .sum (acc[N]),
      .cout(unused_cout[N])
    );
    assign colsum[k] = acc[N];
  end

  for (genvar k = 0; k < NCOL; k++) begin : g_out
    assign P[SLICE_W*k +: SLICE_W] = colsum[k][SLICE_W-1:0];
  end
  // top slice: bits 7..4 of the last column sum (its higher bits are zero)
  assign P[2*WIDTH-1 -: SLICE_W] = colsum[NCOL-1][2*SLICE_W-1:SLICE_W];
endmodule
