// ecm: error-correcting module for an approximate compressor chain.
//
// The approximate compressors only ever under-count, so the multiplier adds a
// correcting 1 just above the most significant compressor of the chain. When
// the inputs of that most significant compressor are all zero (probability
// 81/256 with random operands) the compressor is exact and the correction
// would only add error, so the module then returns 0. It sees the same four
// inputs as that compressor and is a 4-input OR.
// Its behaviour (0 only for the all-zero pattern) is the document's; the gate
// form is the simplest that has it. Combinational.
module ecm (
  input  logic [3:0] y,     // inputs of the MSB approximate compressor
  output logic       corr   // correcting bit, weight one column above it
);

  assign corr = |y;

endmodule
