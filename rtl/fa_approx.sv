// fa_approx: approximate full adder of one AND, one OR and one inverter.
//
// The carry is formed as carry = a | (b & c) and the sum is simply its
// complement, sum = ~carry. Compared with an exact full adder the carry is
// wrong for one input pattern and the sum for three; the value 2*carry + sum
// is off by one for inputs (a,b,c) = 000 (+1), 100 (+1) and 111 (-1):
//   abc  exact  approx
//   000    0      1
//   001    1      1
//   010    1      1
//   011    2      2
//   100    1      2
//   101    2      2
//   110    2      2
//   111    3      2
// The gate structure is the document's. Its printed truth table lists the
// same function with the operand that feeds the OR gate in the third column;
// here that operand is port a. Combinational.
module fa_approx (
  input  logic a,     // OR-gate operand
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  assign carry = a | (b & c);
  assign sum   = ~carry;

endmodule
