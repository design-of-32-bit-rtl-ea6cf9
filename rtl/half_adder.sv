// half_adder: one-bit half adder, the two-input cell of the 4x4 Wallace
// reduction tree. sum = a XOR b, carry = a AND b. Purely combinational.
// The cell is named in the 4-bit Wallace block diagram; its equations are the
// textbook ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
