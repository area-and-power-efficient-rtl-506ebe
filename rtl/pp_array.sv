// pp_array: partial-product generator of an N x N unsigned multiplier.
// Row i is the multiplicand a gated by multiplier bit b[i]: pp[i][j] = a[j] & b[i],
// of weight 2^(i+j). An array of N*N AND gates; combinational.
module pp_array #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,              // multiplicand (x in the matrix)
  input  logic [N-1:0] b,              // multiplier (y in the matrix)
  output logic [N-1:0] pp [N]          // pp[i][j] = a[j] & b[i]
);

  for (genvar i = 0; i < N; i++) begin : g_row
    assign pp[i] = a & {N{b[i]}};
  end

endmodule
