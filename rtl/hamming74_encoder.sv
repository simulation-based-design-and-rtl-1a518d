// hamming74_encoder: Hamming (7,4) code unit.
//
// Encodes data bits b = B3..B0 into the 7-bit code h = H6..H0 with three
// even-parity bits:
//   H6 = B3^B2^B0   H5 = B3^B1^B0   H4 = B3   H3 = B2^B1^B0
//   H2 = B2         H1 = B1         H0 = B0
// This is the classic p1 p2 d p3 d d d order. The parity equations are the
// source design's; the placement of B3 in H4 and of the third parity bit in
// H3 follows the encoded values its simulation prints (its written equations
// place them the other way round). Combinational.
module hamming74_encoder (
  input  logic [3:0] b,
  output logic [6:0] h
);

  assign h = {b[3] ^ b[2] ^ b[0],
              b[3] ^ b[1] ^ b[0],
              b[3],
              b[2] ^ b[1] ^ b[0],
              b[2], b[1], b[0]};

endmodule
