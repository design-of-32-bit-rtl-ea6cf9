// wallace4: unsigned 4x4-bit Wallace multiplier, the "bit-slice multiplier"
// that multiplies one 4-bit slice of A by one 4-bit slice of B.
//
// The sixteen AND-gate bit products a[i]&b[j] are reduced column by column
// with full adders (three bits of one weight in) and half adders (two bits
// in); every carry moves one column to the left. The tree uses eight full
// adders and four half adders; the final carry of column 6 is p[7], so no
// separate carry-propagate adder is needed.
//
//   col 0: p0 = a0b0
//   col 1: HA(a1b0, a0b1)                  -> p1, c1
//   col 2: FA(a2b0, a1b1, a0b2) -> s1, c2;  HA(s1, c1) -> p2, c3
//   col 3: FA(a3b0, a2b1, a1b2) -> s2, c4;  FA(s2, a0b3, c2) -> s3, c5;
//          HA(s3, c3) -> p3, c6
//   col 4: FA(a3b1, a2b2, a1b3) -> s4, c7;  FA(s4, c4, c5) -> s5, c8;
//          HA(s5, c6) -> p4, c9
//   col 5: FA(a3b2, a2b3, c7)   -> s6, c10; FA(s6, c8, c9) -> p5, c11
//   col 6: FA(a3b3, c10, c11)   -> p6, p7
//
// The grouping of bit products in the first adder row, and the use of half
// adders at columns 1 and 6 with full adders between, follow the 4-bit
// Wallace block diagram of the design; the second and third rows are wired
// so that every carry lands one column up, which is this design's choice.
// Purely combinational; interface: a, b (4 bits each) in, p (8 bits) out.
module wallace4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0][3:0] pp;   // pp[i][j] = a[i] & b[j]
  for (genvar i = 0; i < 4; i++) begin : g_pp
    assign pp[i] = b & {4{a[i]}};
  end

  logic s1, s2, s3, s4, s5, s6;
  logic c1, c2, c3, c4, c5, c6, c7, c8, c9, c10, c11;

  assign p[0] = pp[0][0];
  // column 1
  half_adder u_ha1 (.a(pp[1][0]), .b(pp[0][1]), .sum(p[1]), .carry(c1));
  // column 2
  full_adder u_fa1 (.a(pp[2][0]), .b(pp[1][1]), .c(pp[0][2]), .sum(s1), .carry(c2));
  half_adder u_ha2 (.a(s1), .b(c1), .sum(p[2]), .carry(c3));
  // column 3
  full_adder u_fa2 (.a(pp[3][0]), .b(pp[2][1]), .c(pp[1][2]), .sum(s2), .carry(c4));
  full_adder u_fa3 (.a(s2), .b(pp[0][3]), .c(c2), .sum(s3), .carry(c5));
  half_adder u_ha3 (.a(s3), .b(c3), .sum(p[3]), .carry(c6));
  // column 4
  full_adder u_fa4 (.a(pp[3][1]), .b(pp[2][2]), .c(pp[1][3]), .sum(s4), .carry(c7));
  full_adder u_fa5 (.a(s4), .b(c4), .c(c5), .sum(s5), .carry(c8));
  half_adder u_ha4 (.a(s5), .b(c6), .sum(p[4]), .carry(c9));
  // column 5
  full_adder u_fa6 (.a(pp[3][2]), .b(pp[2][3]), .c(c7), .sum(s6), .carry(c10));
  full_adder u_fa7 (.a(s6), .b(c8), .c(c9), .sum(p[5]), .carry(c11));
  // column 6; its carry is the top product bit
  full_adder u_fa8 (.a(pp[3][3]), .b(c10), .c(c11), .sum(p[6]), .carry(p[7]));
endmodule
