// fa_exact: exact full adder, the [3,2] counter of a Dadda tree.
// sum = a ^ b ^ c, carry = majority(a, b, c). Combinational.
module fa_exact (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (c & (a ^ b));

endmodule
