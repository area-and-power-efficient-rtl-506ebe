// half_adder: exact [2,2] counter of the Dadda tree.
// sum = a ^ b, carry = a & b. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
