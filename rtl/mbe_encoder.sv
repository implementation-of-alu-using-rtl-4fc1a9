// Radix-4 modified Booth encoder.
//
// Recodes one overlapping triplet of the multiplier, b = {b2i+1, b2i, b2i-1},
// into the Booth digit {-2,-1,0,+1,+2} carried by three signals:
//   neg = b2i+1 & ~(b2i & b2i-1)   (digit is negative; 111 is -0, so neg=0)
//   one = b2i ^ b2i-1              (|digit| = 1)
//   two = triplet is 011 or 100    (|digit| = 2)
// These are the encoding of the source's MBE table. Combinational.
module mbe_encoder
  import mbe_pkg::*;
(
  input  logic [2:0]  b,
  output booth_code_t code
);
  always_comb begin
    code.neg = b[2] & ~(b[1] & b[0]);
    code.one = b[1] ^ b[0];
    code.two = (b[2] & ~b[1] & ~b[0]) | (~b[2] & b[1] & b[0]);
  end
endmodule
