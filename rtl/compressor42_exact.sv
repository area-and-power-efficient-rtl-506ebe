// compressor42_exact: exact 4-2 compressor.
//
// Five bits of equal weight (a1..a4 and cin, the COUT of the compressor one
// column below) are encoded as sum (same weight) plus carry and cout (twice
// the weight), so that sum + 2*(carry + cout) = a1 + a2 + a3 + a4 + cin.
// cout does not depend on cin, so a row of these compressors has no ripple.
//   cout  = a3(a1^a2) + a1 ~(a1^a2)
//   carry = cin(a1^a2^a3^a4) + a4 ~(a1^a2^a3^a4)
//   sum   = cin ^ a1 ^ a2 ^ a3 ^ a4
// The equations are the document's. Combinational.
module compressor42_exact (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic x12, x1234;

  assign x12   = a1 ^ a2;
  assign x1234 = x12 ^ a3 ^ a4;
  assign cout  = x12 ? a3 : a1;
  assign carry = x1234 ? cin : a4;
  assign sum   = x1234 ^ cin;

endmodule
