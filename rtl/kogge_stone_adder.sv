// kogge_stone_adder: WIDTH-bit parallel-prefix (Kogge-Stone) carry-lookahead
// adder, used to sum the 8-bit slice products of one column.
//
// Bit i forms generate g = a&b and propagate p = a^b. log2(WIDTH) prefix
// levels follow; at level L every bit i >= 2^L combines with bit i-2^L:
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo.
// The carry-in enters as the generate of a virtual bit -1 (folded into bit
// 0's generate). After the last level G[i] is the carry out of bit i, so
// sum[i] = p[i] ^ carry into bit i, and cout = G[WIDTH-1].
// Purely combinational. The Kogge-Stone choice and the 11-bit default width
// are the design's; the carry-in port is this implementation's addition.
// WIDTH must be at least 2.
module kogge_stone_adder #(
  parameter int unsigned WIDTH = 11
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p0;
  logic [LEVELS:0][WIDTH-1:0]   g;
  logic [LEVELS-1:0][WIDTH-1:0] p;   // the last level needs no propagate

  assign p0   = a ^ b;
  assign p[0] = p0;
  // bit 0 absorbs the carry-in: g0' = g0 | (p0 & cin)
  always_comb begin
    g[0]    = a & b;
    g[0][0] = (a[0] & b[0]) | (p0[0] & cin);
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 2 ** l;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= D) begin : g_comb
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        if (l + 1 < LEVELS) begin : g_p
          assign p[l+1][i] = p[l][i] & p[l][i-D];
        end
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        if (l + 1 < LEVELS) begin : g_p
          assign p[l+1][i] = p[l][i];
        end
      end
    end
  end

  // carry into bit i is the prefix generate of bits i-1..0 (with cin)
  assign sum  = p0 ^ {g[LEVELS][WIDTH-2:0], cin};
  assign cout = g[LEVELS][WIDTH-1];
endmodule
