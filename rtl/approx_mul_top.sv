// approx_mul_top: the four proposed 8-bit approximate multipliers side by side.
//
// All four multiply the same unsigned operands a and b and differ only in the
// approximate 4-2 compressor used in the N-1 low columns and in how the
// compressor chain is corrected; all use the approximate full adder in the
// reduction stages of those low columns (see approx_mul).
//   p[0]  design 1 (MUL1): UCAC1, constant correcting bit
//   p[1]  design 2 (MUL2): UCAC1, error-correcting module
//   p[2]  design 3 (MUL3): UCAC2, error-correcting module
//   p[3]  design 4 (MUL4): UCAC3, error-correcting module
// The four configurations are the document's; putting them behind one pair of
// operand ports is this design's choice. Purely combinational: p follows a and
// b after the tree's logic delay, with no clock or handshake.
module approx_mul_top
  import approx_mul_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [3:0][2*N-1:0] p
);

  approx_mul #(.N(N), .UCAC(UCAC1), .CORR(CORR_CONST)) u_mul1 (.a(a), .b(b), .p(p[0]));
  approx_mul #(.N(N), .UCAC(UCAC1), .CORR(CORR_ECM))   u_mul2 (.a(a), .b(b), .p(p[1]));
  approx_mul #(.N(N), .UCAC(UCAC2), .CORR(CORR_ECM))   u_mul3 (.a(a), .b(b), .p(p[2]));
  approx_mul #(.N(N), .UCAC(UCAC3), .CORR(CORR_ECM))   u_mul4 (.a(a), .b(b), .p(p[3]));

endmodule
