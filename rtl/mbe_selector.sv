// Booth partial-product bit selector.
//
// Produces bit j of a Booth partial-product row from the encoder outputs and
// two neighbouring multiplicand bits: with one set it takes a_j, with two set
// it takes a_(j-1) (the multiplicand shifted left once), and for a negative
// digit the chosen bit is inverted. The inversion uses b2i+1 rather than
// neg, as the source's selector circuit does: wherever one or two is set the
// two are equal, and for the digits 0 and -0 the output is 0 either way.
//   p = one & (a_j ^ b2i+1) | two & (a_(j-1) ^ b2i+1)
// The +1 that completes the two's complement of a negative row is added
// separately by the partial-product array. The code's neg field is
// therefore not read here (lint reports it unused). Combinational.
module mbe_selector
  import mbe_pkg::*;
(
  input  booth_code_t code,
  input  logic        b_msb,
  input  logic        a_j,
  input  logic        a_jm1,
  output logic        p
);
  always_comb begin
    p = (code.one & (a_j ^ b_msb)) | (code.two & (a_jm1 ^ b_msb));
  end
endmodule
