// full_adder: one-bit full adder, the three-input (3:2 counter) cell of the
// 4x4 Wallace reduction tree. sum = a XOR b XOR c, carry = majority(a, b, c).
// Purely combinational. The cell is named in the 4-bit Wallace block
// diagram; its equations are the textbook ones.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule
