// ucac: ultra-compact approximate 4-2 compressor.
//
// Takes four bits of one partial-product column and returns a single bit of
// the same weight, so the error distance (output minus the number of ones in
// the inputs) is never positive: 0 or -1 in the frequent cases with at most
// two ones, down to -3 when all four inputs are 1. A chain of these in the
// low columns of a multiplier is balanced by one correcting bit placed just
// above the chain (see ecm and approx_mul).
//   UCAC1  s = y1y2 + (y1+y2)(y3+y4) + y3y4   (1 when two or more inputs are 1)
//   UCAC2  s = (y1+y2)(y3+y4)                 (UCAC1 without its first and last term)
//   UCAC3  s = y2 + y4                        (a single OR gate)
// The three functions and their truth tables are the document's. y[0] is y1.
// Interface: y[3:0] in, s out; purely combinational.
module ucac
  import approx_mul_pkg::*;
#(
  parameter ucac_kind_e KIND = UCAC1
) (
  input  logic [3:0] y,   // y[0] = y1 ... y[3] = y4
  output logic       s
);

  always_comb begin
    unique case (KIND)
      UCAC1:   s = (y[0] & y[1]) | ((y[0] | y[1]) & (y[2] | y[3])) | (y[2] & y[3]);
      UCAC2:   s = (y[0] | y[1]) & (y[2] | y[3]);
      UCAC3:   s = y[1] | y[3];
      default: s = 1'b0;
    endcase
  end

endmodule
